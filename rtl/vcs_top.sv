// vcs_top: Voter-Comparator-Switch (VCS).
//
// The VCS sits between four redundant computers (A-D) and a serial data bus
// to subsystem local processors (LP). Four input channels take byte-serial
// commands and data from the computers; the voter section votes the
// redundant data bit-serially (selector, comparator, three-way or four-way,
// as chosen by the computers through the R matrix and masked by computer
// status in the P matrix) and transmits the result on the LP bus; the output
// channel hands every word on the LP bus, and matrix samples, back to the
// computers; the matrix section holds the P, R and S matrices and serves
// the computers' set and sample commands; the clock generator divides the
// host clock (nine periods per bit time) into bit times and the four clock
// phases.
//
// Interface: per-computer arrays (index 0..3 = A..D) for the input
// channels; one shared output bus with a data strobe and four matrix strobes;
// the LP bus as a transmit pair (lp_tx_valid/lp_tx_data, one bit per bit
// time) and a receive pair (lp_rx_valid/lp_rx_data), whose line drivers and
// receivers are outside this design; in the intended system the receive pair
// hears the VCS's own transmission as well as subsystem replies. All VCS
// logic runs on `clk` with the bit-time enable from the clock generator;
// pwron is the synchronous power-on reset. The matrices and the operating
// mode register, with the individual mode terms behind it, are brought out
// for observation.
module vcs_top
  import vcs_pkg::*;
#(
  parameter int unsigned VCS_ID = 0   // address bit (control byte bit 5+VCS_ID)
) (
  input  logic            clk,
  input  logic            pwron,
  // computers to input channels
  input  logic [3:0][7:0] c_data,
  input  logic [3:0]      c_parity,
  input  logic [3:0]      c_strobe,
  input  logic [3:0]      c_eom,
  input  logic [3:0]      c_nogo,
  output logic [3:0]      c_next_byte,
  output logic [3:0]      c_bad_parity,
  // output channel to computers
  output logic [7:0]      o_data,
  output logic            o_parity,
  output logic            o_data_strobe,
  output logic [3:0]      o_matrix_strobe,
  output logic            o_power_reset,
  // LP data bus
  output logic            lp_tx_valid,
  output logic            lp_tx_data,
  input  logic            lp_rx_valid,
  input  logic            lp_rx_data,
  // clocks
  output logic            bit_en,
  output logic            phi12,
  output logic            phi23,
  output logic            phi34,
  output logic            phi4,
  output logic            phi41,
  // observation
  output logic [15:0]     p_mat,
  output logic [15:0]     r_mat,
  output logic [15:0]     s_mat,
  output logic [3:0]      op_mode,
  output mode_terms_t     mode_terms,
  output logic            voter_busy
);

  logic [3:0]      shift, load_brb, brbf, done, brb_msb, par4, insrv, mi;
  logic [3:0][7:0] brb;
  logic [3:0]      used, disagree, dest;
  logic            newmod, stat_valid, oreq, or_pulse, lp_abort, rp_written;
  logic [7:0]      mbr;

  vcs_clock_generator u_clk (
    .clk, .pwron, .bit_en, .phi12, .phi23, .phi34, .phi4, .phi41
  );

  for (genvar i = 0; i < NUM_CH; i++) begin : g_ch
    vcs_input_channel #(.VCS_ID(VCS_ID)) u_ic (
      .clk, .bit_en, .pwron,
      .data_in     (c_data[i]),
      .parity_in   (c_parity[i]),
      .data_strobe (c_strobe[i]),
      .end_of_msg  (c_eom[i]),
      .next_byte   (c_next_byte[i]),
      .bad_parity  (c_bad_parity[i]),
      .shift       (shift[i]),
      .load_brb    (load_brb[i]),
      .brbf        (brbf[i]),
      .done        (done[i]),
      .brb_msb     (brb_msb[i]),
      .par4        (par4[i]),
      .insrv       (insrv[i]),
      .mi          (mi[i]),
      .brb         (brb[i])
    );
  end

  vcs_voter_section u_voter (
    .clk, .bit_en, .pwron,
    .used, .newmod, .brbf, .done,
    .data_bit (brb_msb), .par4, .shift, .load_brb,
    .lp_tx_valid, .lp_tx_data,
    .stat_valid, .disagree, .busy (voter_busy)
  );

  vcs_matrix_section u_matrix (
    .clk, .bit_en, .pwron,
    .mi, .brb, .insrv, .comp_nogo (c_nogo),
    .used, .newmod, .stat_valid, .disagree,
    .oreq, .mbr, .dest, .or_in (or_pulse), .lp_abort, .rp_written,
    .p_mat, .r_mat, .s_mat, .om (op_mode), .terms (mode_terms)
  );

  vcs_output_channel u_out (
    .clk, .bit_en, .pwron,
    .lp_rx_valid, .lp_rx_data,
    .oreq, .mbr, .dest, .or_out (or_pulse), .lp_abort, .rp_written,
    .data_out (o_data), .parity_out (o_parity), .data_strobe (o_data_strobe),
    .matrix_strobe (o_matrix_strobe), .power_reset (o_power_reset)
  );

endmodule
