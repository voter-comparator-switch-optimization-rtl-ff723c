// tb_vcs_faults: failure-mode run of the complete VCS. One internal net at a
// time is held stuck at 0 or at 1 while a short exercise sequence runs.
//
// The exercise sequence is the same for every case: power-on; all four
// computers load R = 1111 and P = 1111 (four-way voting); an output message
// of two data words from all four computers; a one-word Go/No Go message;
// and a P-diagonal/mode sample by computer A. Each computer compares the
// data fed back on the output bus with what it sent and sends the Go word
// only if every word came back correctly, as the recommended output
// procedure prescribes; otherwise it sends the No Go word. A local-processor
// model decodes the 17-bit words on the LP bus. Status flags are raised on the
// computer side (no next-byte request, feedback wrong or missing, S matrix
// non-zero, wrong mode or P diagonal, matrix byte parity) and on the LP side
// (word parity error, No Go received, message wrong). A case is "detected"
// if any flag is raised, "no effect" if none is, and "undetected" (a single
// point failure) if the LP got a wrong message followed by the Go word. The
// fault-free run must raise no flag, and no stuck-at case may be undetected.
// Faults are applied with force/release on nets between the blocks of
// vcs_top, one bit per net; this list of nets is this design's choice (the
// specification's study failed single gates of its logic equations). The
// Go/No Go word is sent as its own one-word message, after the computers
// have seen the whole feedback of the data words; this is also this design's
// simplification of the final word of the message.
module tb_vcs_faults;
  import vcs_pkg::*;

  logic            clk = 0, pwron = 1;
  logic [3:0][7:0] c_data = '0;
  logic [3:0]      c_parity = '0, c_strobe = '0, c_eom = '0, c_nogo = '0;
  logic [3:0]      c_next_byte, c_bad_parity;
  logic [7:0]      o_data;
  logic            o_parity, o_data_strobe, o_power_reset;
  logic [3:0]      o_matrix_strobe;
  logic            lp_tx_valid, lp_tx_data, lp_rx_valid, lp_rx_data;
  logic            bit_en, phi12, phi23, phi34, phi4, phi41;
  logic [15:0]     p_mat, r_mat, s_mat;
  logic [3:0]      op_mode;
  mode_terms_t     mode_terms;
  logic            voter_busy;

  vcs_top dut (.*);

  always #5 clk = ~clk;
  assign lp_rx_valid = lp_tx_valid;
  assign lp_rx_data  = lp_tx_data;

  localparam logic [15:0] GO_WORD   = 16'h6A5C;
  localparam logic [15:0] NOGO_WORD = 16'h95A3;
  localparam int          NUM_NETS  = 26;

  int  checks = 0, failures = 0;
  bit  detected;              // a status flag was raised in this case
  logic stuck = 0;            // value of the stuck net

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic flag(input bit cond);
    if (!cond) detected = 1;
  endtask

  task automatic tick(input int n = 1);
    repeat (n) @(posedge clk iff bit_en);
  endtask

  // ---------------- output bus and LP bus monitors ----------------
  logic [8:0]  fb [$];        // LP data bytes fed back to the computers
  logic [8:0]  ms [$];        // matrix bytes for computer A
  logic [15:0] lp_words [$];  // words decoded by the LP
  int          lp_par_err = 0;
  logic [16:0] lp_sh = '0;
  int          lp_n = 0;
  logic ds_q = 0, ms_q = 0;
  always @(posedge clk) if (bit_en) begin
    ds_q <= o_data_strobe;
    ms_q <= o_matrix_strobe[0];
    if (o_data_strobe && !ds_q) fb.push_back({o_parity, o_data});
    if (o_matrix_strobe[0] && !ms_q) ms.push_back({o_parity, o_data});
    if (lp_tx_valid) begin
      logic [16:0] w;
      w = {lp_sh[15:0], lp_tx_data};
      lp_sh <= w;
      if (lp_n == FRAME_BITS - 1) begin
        lp_words.push_back(w[16:1]);
        if (!(^w)) lp_par_err <= lp_par_err + 1;
        lp_n <= 0;
      end else lp_n <= lp_n + 1;
    end else lp_n <= 0;
  end

  // ---------------- computer model ----------------
  logic [7:0] ctl_voter, ctl_set_all, ctl_s_diag;
  assign ctl_voter   = {4'b0001, 1'b0, 3'b000};
  assign ctl_set_all = {4'b0001, 1'b1, OP_SET_ALL};
  assign ctl_s_diag  = {4'b0001, 1'b1, OP_SAMPLE_DIAG};

  task automatic put_byte(input int c, input logic [7:0] b, input bit eom = 0);
    @(negedge clk);
    c_data[c]   = b;
    c_parity[c] = odd_parity(b);
    c_strobe[c] = 1;
    c_eom[c]    = eom;
    tick(2);
    @(negedge clk);
    c_strobe[c] = 0;
  endtask

  task automatic wait_next(input int c, output bit ok);
    ok = 0;
    for (int i = 0; i < 60; i++) begin
      tick();
      if (c_next_byte[c]) begin ok = 1; return; end
    end
  endtask

  task automatic voter_msg(input int c, input logic [15:0] words [$]);
    bit ok;
    put_byte(c, ctl_voter);
    foreach (words[k])
      for (int h = 0; h < 2; h++) begin
        wait_next(c, ok);
        flag(ok);
        if (!ok) return;
        tick();
        put_byte(c, (h != 0) ? words[k][7:0] : words[k][15:8], (k == words.size() - 1) && (h != 0));
      end
    tick(2);
    @(negedge clk); c_eom[c] = 0;
  endtask

  task automatic set_rp(input int c, input logic [3:0] r_row, input logic [3:0] p_row);
    bit ok;
    put_byte(c, ctl_set_all);
    wait_next(c, ok);
    flag(ok);
    if (!ok) return;
    tick();
    put_byte(c, {r_row, p_row});
    tick(12);
  endtask

  task automatic wait_voter_idle();
    for (int i = 0; i < 400 && !voter_busy; i++) tick();
    for (int i = 0; i < 2000 && voter_busy; i++) tick();
    tick(6);
  endtask

  // feedback of a message is correct: right count, right words, odd parity
  function automatic bit feedback_ok(input logic [15:0] words [$]);
    if (fb.size() != 2 * words.size()) return 0;
    foreach (words[k])
      if (fb[2*k][7:0] != words[k][15:8] || fb[2*k+1][7:0] != words[k][7:0] ||
          !(^fb[2*k]) || !(^fb[2*k+1])) return 0;
    return 1;
  endfunction

  // ---------------- fault injection ----------------
  task automatic apply(input int f);
    case (f)
      0:  force dut.shift[0]     = stuck;
      1:  force dut.shift[3]     = stuck;
      2:  force dut.load_brb[1]  = stuck;
      3:  force dut.brbf[2]      = stuck;
      4:  force dut.done[0]      = stuck;
      5:  force dut.done[3]      = stuck;
      6:  force dut.brb_msb[1]   = stuck;
      7:  force dut.par4[2]      = stuck;
      8:  force dut.used[0]      = stuck;
      9:  force dut.used[3]      = stuck;
      10: force dut.disagree[1]  = stuck;
      11: force dut.newmod       = stuck;
      12: force dut.stat_valid   = stuck;
      13: force dut.oreq         = stuck;
      14: force dut.or_pulse     = stuck;
      15: force dut.lp_abort     = stuck;
      16: force dut.rp_written   = stuck;
      17: force dut.mbr[0]       = stuck;
      18: force dut.lp_rx_data   = stuck;
      19: force dut.lp_rx_valid  = stuck;
      20: force dut.insrv[0]     = stuck;
      21: force dut.mi[1]        = stuck;
      22: force dut.dest[0]      = stuck;
      23: force dut.brb[1][7]    = stuck;
      24: force dut.lp_tx_data   = stuck;
      25: force dut.lp_tx_valid  = stuck;
      default: ;
    endcase
  endtask

  task automatic remove(input int f);
    case (f)
      0:  release dut.shift[0];
      1:  release dut.shift[3];
      2:  release dut.load_brb[1];
      3:  release dut.brbf[2];
      4:  release dut.done[0];
      5:  release dut.done[3];
      6:  release dut.brb_msb[1];
      7:  release dut.par4[2];
      8:  release dut.used[0];
      9:  release dut.used[3];
      10: release dut.disagree[1];
      11: release dut.newmod;
      12: release dut.stat_valid;
      13: release dut.oreq;
      14: release dut.or_pulse;
      15: release dut.lp_abort;
      16: release dut.rp_written;
      17: release dut.mbr[0];
      18: release dut.lp_rx_data;
      19: release dut.lp_rx_valid;
      20: release dut.insrv[0];
      21: release dut.mi[1];
      22: release dut.dest[0];
      23: release dut.brb[1][7];
      24: release dut.lp_tx_data;
      25: release dut.lp_tx_valid;
      default: ;
    endcase
  endtask

  // one exercise sequence; returns 0 no effect, 1 detected, 2 undetected
  task automatic exercise(input int f, output int result);
    logic [15:0] msg [$], fin [$];
    bit          lp_msg_ok, fb_ok [4];
    @(negedge clk);
    pwron = 1; c_strobe = '0; c_eom = '0; c_nogo = '0;
    repeat (30) @(posedge clk);
    @(negedge clk) pwron = 0;
    detected = 0;
    apply(f);
    tick(4);
    fb.delete(); ms.delete(); lp_words.delete(); lp_par_err = 0;

    for (int c = 0; c < 4; c++) set_rp(c, 4'b1111, 4'b1111);
    tick(4);

    // output message; every computer checks its own feedback
    msg = '{16'h1A2B, 16'h3C4D};
    fork
      voter_msg(0, msg);
      voter_msg(1, msg);
      voter_msg(2, msg);
      voter_msg(3, msg);
    join
    wait_voter_idle();
    foreach (fb_ok[c]) fb_ok[c] = feedback_ok(msg);
    lp_msg_ok = (lp_words.size() == 2 && lp_words[0] == msg[0] && lp_words[1] == msg[1]);

    // Go / No Go word chosen from the feedback comparison
    fb.delete();
    fork
      voter_msg(0, '{fb_ok[0] ? GO_WORD : NOGO_WORD});
      voter_msg(1, '{fb_ok[1] ? GO_WORD : NOGO_WORD});
      voter_msg(2, '{fb_ok[2] ? GO_WORD : NOGO_WORD});
      voter_msg(3, '{fb_ok[3] ? GO_WORD : NOGO_WORD});
    join
    wait_voter_idle();

    // compute status: P diagonal and mode, S matrix
    put_byte(0, ctl_s_diag);
    for (int i = 0; i < 60 && ms.size() < 1; i++) tick();
    tick(4);
    flag(ms.size() == 1 && ms[0][7:0] == 8'hFF && (^ms[0]));
    flag(s_mat == 16'h0000);
    foreach (fb_ok[c]) flag(fb_ok[c]);
    flag(lp_par_err == 0);
    flag(lp_msg_ok);
    flag(lp_words.size() == 3 && lp_words[2] == GO_WORD);

    if (!lp_msg_ok && lp_words.size() >= 3 && lp_words[2] == GO_WORD) result = 2;
    else result = detected ? 1 : 0;
    remove(f);
  endtask

  initial begin
    int r, n_none, n_det, n_undet;
    n_none = 0; n_det = 0; n_undet = 0;

    exercise(-1, r);
    check(r == 0, "fault-free exercise sequence raises no flag");

    for (int f = 0; f < NUM_NETS; f++)
      for (int v = 0; v < 2; v++) begin
        stuck = v[0];
        exercise(f, r);
        case (r)
          0: n_none++;
          1: n_det++;
          default: n_undet++;
        endcase
        check(r != 2, $sformatf("net %0d stuck at %0d: wrong message with Go word", f, v));
      end
    $display("stuck-at cases: %0d detected, %0d no effect, %0d undetected",
             n_det, n_none, n_undet);
    check(n_det > 0, "some stuck-at faults are detected");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (9 * 200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
