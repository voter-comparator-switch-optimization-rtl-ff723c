// tb_vcs_top: end-to-end test of the complete VCS with its default
// parameters.
//
// Four behavioural computers drive the input channels through the byte
// protocol (control byte, then data bytes on request, odd parity, end of
// message with the last byte) and read the shared output bus. The LP bus is
// looped back, as on the real bus, so every voted word comes back to the
// computers through the output channel; a subsystem reply can also be put on
// the bus. The run walks through: power-on and power reset; loading R and P
// from all computers; four-way voting with one computer sending a wrong word
// (the word is outvoted and the S matrix marks that computer); sampling and
// clearing S; switching to three-way voting with a parity retry and with a
// computer arriving late inside the waiting window; comparator
// mode, including a second computer arriving too late; selector mode; a
// computer no-go clearing its P diagonal, read back with a diagonal sample;
// LP data overriding a matrix sample; and an input transmission from a
// subsystem with a parity error passed through. Each of these mechanisms is
// counted and must occur at least once. Voted output is checked word by
// word against the majority data, and the 17-bit-time word rate on the LP
// bus is checked.
module tb_vcs_top;
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
  logic            ext_valid = 0, ext_data = 0;

  vcs_top dut (.*);

  always #5 clk = ~clk;
  // loop-around bus: the VCS hears its own transmission and subsystem replies
  assign lp_rx_valid = lp_tx_valid | ext_valid;
  assign lp_rx_data  = lp_tx_valid ? lp_tx_data : ext_data;

  int checks = 0, failures = 0;
  typedef enum int {
    EV_LOAD_RP, EV_VOTE4, EV_VOTE3, EV_COMPARE, EV_SELECT, EV_OUTVOTED,
    EV_PARITY_RETRY, EV_SAMPLE_S, EV_CLEAR_S, EV_SAMPLE_DIAG, EV_SAMPLE_ALL,
    EV_MODE_SWITCH, EV_COMP_TIMEOUT, EV_NOGO, EV_LP_PRIORITY, EV_LP_INPUT,
    EV_LP_PARITY_ERR, EV_POWER_RESET, EV_LATE_IN_WINDOW, EV_COUNT
  } ev_e;
  int ev [EV_COUNT];

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic tick(input int n = 1);
    repeat (n) @(posedge clk iff bit_en);
  endtask

  // ---------------- output bus monitor ----------------
  logic [8:0] fb [$];          // LP data bytes seen by the computers
  logic [8:0] ms [4][$];       // matrix bytes per computer
  logic ds_q = 0; logic [3:0] ms_q = '0;
  int   lp_run = 0, lp_runs_ok = 1, aborts = 0, lockouts = 0;
  // internal evidence for two mechanisms that are otherwise only visible as
  // something not happening: the matrix sample abort and the comparator lockout
  always @(posedge clk) if (bit_en) begin
    if (dut.lp_abort) aborts++;
    if (dut.u_voter.state == dut.u_voter.V_LOCK) lockouts++;
    ds_q <= o_data_strobe;
    ms_q <= o_matrix_strobe;
    if (o_data_strobe && !ds_q) fb.push_back({o_parity, o_data});
    for (int c = 0; c < 4; c++)
      if (o_matrix_strobe[c] && !ms_q[c]) ms[c].push_back({o_parity, o_data});
    if (lp_tx_valid) lp_run++;
    else begin
      if (lp_run % FRAME_BITS != 0) lp_runs_ok = 0;
      lp_run = 0;
    end
  end

  // ---------------- computer model ----------------
  logic [7:0] ctl_voter, ctl_set_rp, ctl_set_all, ctl_clr_s, ctl_s_all, ctl_s_diag, ctl_s_s;
  assign ctl_voter   = {4'b0001, 1'b0, 3'b000};
  assign ctl_set_all = {4'b0001, 1'b1, OP_SET_ALL};
  assign ctl_set_rp  = {4'b0001, 1'b1, OP_SET_RP};
  assign ctl_clr_s   = {4'b0001, 1'b1, OP_CLR_S};
  assign ctl_s_all   = {4'b0001, 1'b1, OP_SAMPLE_ALL};
  assign ctl_s_diag  = {4'b0001, 1'b1, OP_SAMPLE_DIAG};
  assign ctl_s_s     = {4'b0001, 1'b1, OP_SAMPLE_S};

  int retries = 0;

  // send one byte; with good=0 the parity is wrong and the byte is resent
  task automatic put_byte(input int c, input logic [7:0] b, input bit eom = 0, input bit bad = 0);
    @(negedge clk);
    c_data[c]   = b;
    c_parity[c] = bad ? ~odd_parity(b) : odd_parity(b);
    c_strobe[c] = 1;
    c_eom[c]    = eom;
    tick(2);
    @(negedge clk);
    c_strobe[c] = 0;
    if (bad) begin
      bit seen;
      seen = 0;
      for (int i = 0; i < 6; i++) begin tick(); if (c_bad_parity[c]) seen = 1; end
      check(seen, $sformatf("computer %0d sees bad parity", c));
      if (seen) begin ev[EV_PARITY_RETRY]++; retries++; end
      put_byte(c, b, eom, 0);
    end
  endtask

  task automatic wait_next(input int c, output bit ok);
    ok = 0;
    for (int i = 0; i < 60; i++) begin
      tick();
      if (c_next_byte[c]) begin ok = 1; return; end
    end
  endtask

  // voter message: control byte, words; bad_byte >= 0 corrupts that byte's parity once
  task automatic voter_msg(input int c, input logic [15:0] words [$], input int bad_byte = -1);
    bit ok;
    int nb;
    put_byte(c, ctl_voter);
    nb = 0;
    foreach (words[k]) begin
      for (int h = 0; h < 2; h++) begin
        wait_next(c, ok);
        check(ok, $sformatf("computer %0d: next byte requested", c));
        if (!ok) return;
        tick();
        put_byte(c, h ? words[k][7:0] : words[k][15:8],
                 (k == words.size() - 1) && h, nb == bad_byte);
        nb++;
      end
    end
    tick(2);
    @(negedge clk); c_eom[c] = 0;
  endtask

  task automatic set_rp(input int c, input logic [3:0] r_row, input logic [3:0] p_row,
                        input bit all = 0);
    bit ok;
    put_byte(c, all ? ctl_set_all : ctl_set_rp);
    wait_next(c, ok);
    check(ok, "set: data byte requested");
    tick();
    put_byte(c, {r_row, p_row});
    tick(12);
    ev[EV_LOAD_RP]++;
  endtask

  task automatic sample(input int c, input logic [7:0] ctl, input int n, output logic [7:0] b [$]);
    ms[c].delete();
    put_byte(c, ctl);
    for (int i = 0; i < 40 + 4 * n && ms[c].size() < n; i++) tick();
    tick(4);
    b.delete();
    foreach (ms[c][i]) begin
      check(^ms[c][i], "matrix byte has odd parity");
      b.push_back(ms[c][i][7:0]);
    end
    check(b.size() == n, $sformatf("computer %0d sample: %0d bytes, expected %0d", c, b.size(), n));
  endtask

  // compare feedback bytes with expected words
  task automatic check_feedback(input string name, input logic [15:0] words [$]);
    check(fb.size() == 2 * words.size(),
          $sformatf("%s: %0d bytes fed back, expected %0d", name, fb.size(), 2 * words.size()));
    foreach (words[k]) if (2 * k + 1 < fb.size()) begin
      check(fb[2*k][7:0] == words[k][15:8] && fb[2*k+1][7:0] == words[k][7:0],
            $sformatf("%s: word %0d = %h%h expected %h", name, k, fb[2*k][7:0], fb[2*k+1][7:0], words[k]));
      check(^fb[2*k] && ^fb[2*k+1], $sformatf("%s: word %0d parity", name, k));
    end
  endtask

  task automatic wait_voter_idle();
    for (int i = 0; i < 400 && !voter_busy; i++) tick();
    for (int i = 0; i < 2000 && voter_busy; i++) tick();
    tick(6);
  endtask

  task automatic set_mode(input logic [3:0] rows [4], input logic [3:0] exp);
    logic [3:0] prev_mode;
    prev_mode = op_mode;
    for (int c = 0; c < 4; c++) set_rp(c, rows[c], 4'b1111);
    tick(2);
    check(op_mode == exp, $sformatf("operating mode %b expected %b", op_mode, exp));
    if (op_mode != prev_mode) ev[EV_MODE_SWITCH]++;
  endtask

  initial begin
    logic [15:0] good [$], bad [$];
    logic [15:0] wm [4][$];
    logic [7:0]  b [$];
    logic [3:0]  rows [4];
    foreach (ev[i]) ev[i] = 0;

    repeat (30) @(posedge clk);
    // every interface output is false while power-on is applied
    check({c_next_byte, c_bad_parity, o_data, o_parity, o_data_strobe, o_matrix_strobe,
           o_power_reset, lp_tx_valid, lp_tx_data, bit_en, phi12, phi23, phi34, phi4, phi41} == '0,
          "outputs held false during power-on");
    @(negedge clk) pwron = 0;
    tick(2);
    check(o_power_reset, "power reset raised after power-on");
    if (o_power_reset) ev[EV_POWER_RESET]++;
    check(p_mat == 16'hFFFF && r_mat == 0 && s_mat == 0, "matrices initialised");

    // ---- four-way voting, D sends a wrong second word ----
    rows = '{4'hF, 4'hF, 4'hF, 4'hF};
    set_mode(rows, 4'b1111);
    check(!o_power_reset, "power reset cleared by loading P and R");
    good = '{16'h1A2B, 16'h3C4D, 16'h5E6F};
    bad  = '{16'h1A2B, 16'hFFFF, 16'h5E6F};
    fb.delete();
    fork
      voter_msg(0, good);
      voter_msg(1, good);
      voter_msg(2, good);
      voter_msg(3, bad);
    join
    wait_voter_idle();
    check_feedback("4-way", good);
    ev[EV_VOTE4]++;
    check(s_mat == 16'h8888, $sformatf("S matrix marks D: %h", s_mat));
    if (s_mat[3]) ev[EV_OUTVOTED]++;
    check(lp_runs_ok, "LP transmission is a whole number of 17-bit words");

    // ---- sample and clear S ----
    sample(0, ctl_s_s, 2, b);
    check(b.size() == 2 && b[0] == 8'h88 && b[1] == 8'h88, "S sample by A");
    ev[EV_SAMPLE_S]++;
    check(ms[1].size() == 0 && ms[2].size() == 0, "matrix bytes only to the requesting computer");
    put_byte(0, ctl_clr_s);
    tick(10);
    check(s_mat == 16'h8880, $sformatf("S row A cleared: %h", s_mat));
    ev[EV_CLEAR_S]++;

    // ---- three-way A,B,C with a parity retry on C ----
    rows = '{4'h7, 4'h7, 4'h7, 4'h0};
    set_mode(rows, 4'b0111);
    good = '{16'hBEEF, 16'h0123};
    fb.delete();
    fork
      voter_msg(0, good);
      voter_msg(1, good);
      voter_msg(2, good, 1);
    join
    wait_voter_idle();
    check_feedback("3-way", good);
    ev[EV_VOTE3]++;

    // one-word message with C late but inside the 15-bit-time window: A and B
    // finish sending (end of message with their last byte) while waiting
    good = '{16'h6C6C};
    fb.delete();
    fork
      voter_msg(0, good);
      voter_msg(1, good);
      begin tick(8); voter_msg(2, good); end
    join
    wait_voter_idle();
    check_feedback("3-way late C", good);
    if (fb.size() == 2) ev[EV_LATE_IN_WINDOW]++;

    // ---- comparator A,B ----
    rows = '{4'h3, 4'h3, 4'h0, 4'h0};
    set_mode(rows, 4'b0011);
    good = '{16'hC0DE, 16'h4321, 16'h8000};
    fb.delete();
    fork
      voter_msg(0, good);
      begin tick(5); voter_msg(1, good); end
    join
    wait_voter_idle();
    check_feedback("comparator", good);
    ev[EV_COMPARE]++;

    // comparator with B too late: nothing is sent, A gives up
    fb.delete();
    begin
      bit ok;
      lockouts = 0;
      put_byte(0, ctl_voter);
      wait_next(0, ok); tick();
      put_byte(0, 8'h11);
      wait_next(0, ok); tick();
      put_byte(0, 8'h22);
      tick(30);
      check(!voter_busy && fb.size() == 0, "comparator does not transmit a single copy");
      check(lockouts > 0, "comparator timed out into lockout");
      if (!voter_busy && fb.size() == 0 && lockouts > 0) ev[EV_COMP_TIMEOUT]++;
      @(negedge clk); c_eom[0] = 1;
      tick(3);
      @(negedge clk); c_eom[0] = 0;
      tick(5);
    end

    // ---- selector C ----
    rows = '{4'h0, 4'h0, 4'h4, 4'h0};
    set_mode(rows, 4'b0100);
    good = '{16'h0F0F, 16'hF0F0};
    fb.delete();
    voter_msg(2, good);
    wait_voter_idle();
    check_feedback("selector", good);
    ev[EV_SELECT]++;

    // ---- no-go on D, read back with a diagonal sample ----
    @(negedge clk); c_nogo[3] = 1;
    tick(3);
    check(p_mat[15] == 0, "no-go clears D's P diagonal");
    if (p_mat[15] == 0) ev[EV_NOGO]++;
    sample(1, ctl_s_diag, 1, b);
    check(b.size() == 1 && b[0] == {4'b0100, 4'b0111}, $sformatf("diagonal sample %h", b.size() ? b[0] : 8'h0));
    ev[EV_SAMPLE_DIAG]++;
    @(negedge clk); c_nogo[3] = 0;
    tick(3);

    // ---- sample all by B ----
    sample(1, ctl_s_all, 6, b);
    check(b.size() == 6 && b[0] == r_mat[7:0] && b[1] == r_mat[15:8] && b[2] == p_mat[7:0] &&
          b[3] == p_mat[15:8] && b[4] == s_mat[7:0] && b[5] == s_mat[15:8], "sample all contents");
    ev[EV_SAMPLE_ALL]++;

    // ---- LP data overrides a matrix sample ----
    ms[3].delete();
    fb.delete();
    aborts = 0;
    good = '{16'h7E7E};
    fork
      put_byte(3, ctl_s_all);
      begin tick(1); voter_msg(2, good); end
    join
    wait_voter_idle();
    tick(20);
    check(ms[3].size() < 6, $sformatf("sample cut short by LP data (%0d bytes)", ms[3].size()));
    check(aborts > 0, "matrix transfer aborted by LP activity");
    if (ms[3].size() < 6 && aborts > 0) ev[EV_LP_PRIORITY]++;
    check_feedback("selector during sample", good);

    // ---- input transmission from a subsystem, second word with bad parity ----
    fb.delete();
    good = '{16'hA0A0, 16'h0505};
    for (int k = 0; k < 2; k++)
      for (int t = 0; t < 17; t++) begin
        @(negedge clk);
        ext_valid = 1;
        ext_data  = (t < 16) ? good[k][15 - t] : ((~^good[k]) ^ (k == 1));
        tick();
      end
    @(negedge clk); ext_valid = 0; ext_data = 0;
    tick(6);
    check(fb.size() == 4, $sformatf("subsystem words delivered: %0d bytes", fb.size()));
    if (fb.size() == 4) begin
      check(fb[0][7:0] == 8'hA0 && fb[1][7:0] == 8'hA0 && fb[2][7:0] == 8'h05 && fb[3][7:0] == 8'h05,
            "subsystem data");
      check(^fb[0] && ^fb[1] && ^fb[2], "good words arrive with odd parity");
      check(!(^fb[3]), "LP parity error reaches the computers");
      ev[EV_LP_INPUT]++;
      if (!(^fb[3])) ev[EV_LP_PARITY_ERR]++;
    end

    for (int i = 0; i < EV_COUNT; i++) begin
      ev_e e;
      e = ev_e'(i);
      $display("mechanism %-16s happened %0d times", e.name(), ev[i]);
      check(ev[i] > 0, $sformatf("mechanism %s never happened", e.name()));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (9 * 20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
