// vcs_clock_generator: bit-time and four-phase clock generation.
//
// The host supplies a square wave at nine times the VCS bit rate (9 MHz for
// the nominal 1 us bit time). A modulo-9 counter divides one bit time into
// nine host periods: phase 1 covers periods 0-1 (0-222 ns), phase 2 periods
// 2-3 (222-444 ns), phase 3 periods 4-5 (444-666 ns) and phase 4 periods
// 6-8 (666-1000 ns). The five outputs are the combined phases used by
// four-phase MOS logic (phi1+2, phi2+3, phi3+4, phi4, phi4+1), shown active
// high; their electrical polarity and levels belong to the clock driver,
// which is not modelled. bit_en is high for the last host period of each bit
// time and is the clock enable of all other VCS logic, which here runs
// synchronously on the host clock instead of on the four phases.
// The 9:1 ratio and the phase boundaries follow the specification; the
// enable-based use of the clock is this design's. As the specification
// requires of all VCS outputs, every output is held false while pwron is
// applied.
module vcs_clock_generator
  import vcs_pkg::*;
(
  input  logic clk,       // host square wave, nine per bit time
  input  logic pwron,
  output logic bit_en,
  output logic phi12,
  output logic phi23,
  output logic phi34,
  output logic phi4,
  output logic phi41
);

  logic [3:0] tick;
  logic [3:0] ph;   // one-hot phase 1..4

  always_ff @(posedge clk) begin
    if (pwron) tick <= '0;
    else       tick <= (tick == 4'(CLK_DIV - 1)) ? 4'd0 : tick + 1'b1;
  end

  always_comb begin
    ph[0] = (tick <= 4'd1);
    ph[1] = (tick == 4'd2) || (tick == 4'd3);
    ph[2] = (tick == 4'd4) || (tick == 4'd5);
    ph[3] = (tick >= 4'd6);
  end

  // all clock outputs are held false while power-on reset is applied
  assign phi12  = !pwron && (ph[0] | ph[1]);
  assign phi23  = !pwron && (ph[1] | ph[2]);
  assign phi34  = !pwron && (ph[2] | ph[3]);
  assign phi4   = !pwron && ph[3];
  assign phi41  = !pwron && (ph[3] | ph[0]);
  assign bit_en = (tick == 4'(CLK_DIV - 1)) && !pwron;

endmodule
