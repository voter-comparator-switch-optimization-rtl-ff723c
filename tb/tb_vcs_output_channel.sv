// tb_vcs_output_channel: self-checking test of the VCS output channel.
//
// LP bus words (16 data bits MSB first plus a parity bit, one bit per bit
// time, words back to back) are driven into the receiver and every byte
// strobed to the computers is recorded. The testbench checks the byte values,
// that each byte carries odd parity when the LP word parity is right and
// that a wrong LP parity bit reaches the computers as a parity error on the
// second byte, the two-bit-time data strobe, the matrix transfer (matrix
// strobe to the requesting computer only, output ready pulse, parity), the
// priority of LP data over a matrix transfer, and the power-reset line
// (false during power-on, then raised until P and R are rewritten). Twenty
// random messages of one to four words with random parity errors follow.
module tb_vcs_output_channel;
  import vcs_pkg::*;

  logic clk = 0, bit_en = 1, pwron = 1;
  logic lp_rx_valid = 0, lp_rx_data = 0;
  logic oreq = 0;
  logic [7:0] mbr = '0;
  logic [3:0] dest = '0;
  logic or_out, lp_abort;
  logic rp_written = 0;
  logic [7:0] data_out;
  logic parity_out, data_strobe;
  logic [3:0] matrix_strobe;
  logic power_reset;
  int checks = 0, failures = 0;

  vcs_output_channel dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  // record bytes on the rising edge of each strobe
  logic [8:0] ds_bytes [$];
  logic [12:0] ms_bytes [$];
  logic ds_q = 0; logic [3:0] ms_q = 0;
  int ds_len = 0, ds_max = 0, or_count = 0, abort_count = 0;
  // (outputs are not yet defined while power-on reset is held)
  always @(posedge clk) if (!pwron) begin
    ds_q <= data_strobe;
    ms_q <= matrix_strobe;
    if (data_strobe && !ds_q) ds_bytes.push_back({parity_out, data_out});
    if (matrix_strobe != 0 && ms_q == 0) ms_bytes.push_back({matrix_strobe, parity_out, data_out});
    if (data_strobe) ds_len++; else begin if (ds_len > ds_max) ds_max = ds_len; ds_len = 0; end
    if (or_out) or_count++;
    if (lp_abort) abort_count++;
  end

  task automatic lp_send(input logic [15:0] words [$], input logic [3:0] bad = '0);
    foreach (words[k]) begin
      for (int t = 0; t < 17; t++) begin
        @(negedge clk);
        lp_rx_valid = 1;
        lp_rx_data  = (t < 16) ? words[k][15 - t] : ((~^words[k]) ^ bad[k]);
      end
    end
    @(negedge clk);
    lp_rx_valid = 0;
    lp_rx_data  = 0;
    repeat (4) @(posedge clk);
  endtask

  function automatic bit odd_ok(input logic [8:0] pb);
    return ^pb;   // nine bits with an odd number of ones
  endfunction

  initial begin
    logic [15:0] w [$];
    repeat (3) @(posedge clk);
    check(!power_reset && !data_strobe && matrix_strobe == 0 && !or_out,
          "outputs held false during power-on");
    pwron = 0;
    @(posedge clk);
    check(power_reset, "power reset after power-on");

    // three good words
    w = '{16'hA55A, 16'h0001, 16'hFF00};
    lp_send(w);
    check(ds_bytes.size() == 6, $sformatf("%0d bytes from 3 words", ds_bytes.size()));
    for (int i = 0; i < ds_bytes.size() && i < 6; i++) begin
      logic [7:0] e;
      e = (i % 2 == 0) ? w[i/2][15:8] : w[i/2][7:0];
      check(ds_bytes[i][7:0] == e, $sformatf("byte %0d = %h expected %h", i, ds_bytes[i][7:0], e));
      check(odd_ok(ds_bytes[i]), $sformatf("byte %0d odd parity", i));
    end
    check(ds_max == STROBE_TIME, $sformatf("data strobe %0d bit times", ds_max));

    // a word with a parity error: second byte must show bad parity
    ds_bytes.delete();
    w = '{16'h1234};
    lp_send(w, 4'b0001);
    check(ds_bytes.size() == 2 && odd_ok(ds_bytes[0]) && !odd_ok(ds_bytes[1]),
          "LP parity error passed on to the computers");

    // matrix data to computer C, two bytes
    @(negedge clk); oreq = 1; mbr = 8'h3C; dest = 4'b0100;
    wait (or_out === 1'b1);
    @(negedge clk); mbr = 8'hC1;
    wait (or_out === 1'b0);
    wait (or_out === 1'b1);
    @(negedge clk); oreq = 0;
    repeat (6) @(posedge clk);
    check(ms_bytes.size() == 2, $sformatf("%0d matrix bytes", ms_bytes.size()));
    if (ms_bytes.size() == 2) begin
      check(ms_bytes[0] == {4'b0100, ~^8'h3C, 8'h3C}, "matrix byte 1 strobe/parity/data");
      check(ms_bytes[1] == {4'b0100, ~^8'hC1, 8'hC1}, "matrix byte 2 strobe/parity/data");
    end
    check(or_count == 2, "one output ready per matrix byte");

    // LP data takes priority over a matrix transfer
    ds_bytes.delete();
    @(negedge clk); oreq = 1; mbr = 8'h77; dest = 4'b0001;
    wait (or_out === 1'b1);
    @(negedge clk);
    w = '{16'h0F0F};
    fork
      lp_send(w);
      begin repeat (30) @(negedge clk); oreq = 0; end
    join
    check(abort_count >= 1, "matrix transfer aborted by LP data");
    check(ds_bytes.size() == 2 && ds_bytes[0][7:0] == 8'h0F, "LP word delivered during matrix transfer");

    // random messages: 1-4 random words, random bus parity errors
    for (int it = 0; it < 20; it++) begin
      logic [3:0] bad;
      int nw;
      bit ok;
      nw  = 1 + $urandom % 4;
      bad = 4'($urandom) & 4'((1 << nw) - 1);
      w.delete();
      for (int k = 0; k < nw; k++) w.push_back(16'($urandom));
      ds_bytes.delete();
      lp_send(w, bad);
      ok = (ds_bytes.size() == 2 * nw);
      if (ok) foreach (w[k]) begin
        if (ds_bytes[2*k][7:0] != w[k][15:8] || ds_bytes[2*k+1][7:0] != w[k][7:0]) ok = 0;
        if (!odd_ok(ds_bytes[2*k]) || (odd_ok(ds_bytes[2*k+1]) == bad[k])) ok = 0;
      end
      check(ok, $sformatf("random message %0d: %0d words, parity errors %b", it, nw, bad));
    end

    // power reset clears once P and R are rewritten
    @(negedge clk); rp_written = 1; @(negedge clk); rp_written = 0;
    @(posedge clk);
    check(!power_reset, "power reset cleared by a P/R load");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
