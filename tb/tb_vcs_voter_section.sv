// tb_vcs_voter_section: self-checking test of the VCS voter section.
//
// A simple model of the four input channels stands in front of the voter:
// each holds a list of 16-bit words, presents the first byte with BRB full,
// shifts on `shift`, loads the next byte on `load_brb` and raises DONE when
// the second byte of its last word is loaded; PAR4 is the word's odd parity
// (optionally inverted to inject a parity fault). The LP bus output is
// captured and compared with the expected stream, computed here from the
// mode rules: selector copies, three-way takes the majority, comparator and
// four-way hold the previous bit (also across operations, as VBR is never
// cleared) when there is no agreement. Disagreements reported for the S
// matrix are checked per computer. After directed cases, 200 random cases
// use a random mode, one to four random words and random corrupted words
// and parity faults per channel. Also checked: the
// comparator gives up when the second channel is more than 15 bit times
// late; three-way voting starts 15 bit times after a majority is ready when
// one channel never comes; each word occupies exactly 17 bit times.
module tb_vcs_voter_section;
  import vcs_pkg::*;

  logic clk = 0, bit_en = 1, pwron = 1;
  logic [3:0] used = '0;
  logic newmod = 0;
  logic [3:0] brbf = '0, done = '1, data_bit, par4 = '0;
  logic [3:0] shift, load_brb;
  logic lp_tx_valid, lp_tx_data, stat_valid, busy;
  logic [3:0] disagree;
  int checks = 0, failures = 0;

  vcs_voter_section dut (.*);
  always #5 clk = ~clk;

  // ---------------- channel model ----------------
  logic [7:0]  brb [4];
  logic [7:0]  bytes [4][$];
  logic        par_flip [4];
  logic [15:0] cur_word [4];
  int          nbytes_loaded [4];

  always_comb for (int c = 0; c < 4; c++) data_bit[c] = brb[c][7];

  function automatic logic wpar(input logic [15:0] w);
    return ~^w;
  endfunction

  task automatic arm(input int c, input logic [15:0] words [$], input bit flip = 0);
    bytes[c].delete();
    foreach (words[i]) begin
      bytes[c].push_back(words[i][15:8]);
      bytes[c].push_back(words[i][7:0]);
    end
    par_flip[c] = flip;
    @(negedge clk);
    brb[c]  = bytes[c].pop_front();
    cur_word[c][15:8] = brb[c];
    brbf[c] = 1;
    done[c] = 0;
    nbytes_loaded[c] = 1;
  endtask

  always @(posedge clk) begin
    for (int c = 0; c < 4; c++) begin
      if (shift[c]) begin
        brb[c]  <= {brb[c][6:0], 1'b0};
        brbf[c] <= 0;
      end
      if (load_brb[c] && !done[c] && bytes[c].size() > 0) begin
        logic [7:0] b;
        b = bytes[c].pop_front();
        brb[c] <= b;
        nbytes_loaded[c]++;
        if (nbytes_loaded[c] % 2 == 0) begin
          par4[c] <= wpar({cur_word[c][15:8], b}) ^ par_flip[c];
          if (bytes[c].size() == 0) done[c] <= 1;
        end else cur_word[c][15:8] <= b;
      end
    end
  end

  // ---------------- LP capture ----------------
  logic lp_bits [$];
  logic [3:0] dis_seen;
  int first_tx_cycle, cyc;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (lp_tx_valid) begin
      if (lp_bits.size() == 0) first_tx_cycle = cyc;
      lp_bits.push_back(lp_tx_data);
    end
    if (stat_valid) dis_seen |= disagree;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  logic last_vbr = 1'b0;   // voted bit left from the previous operation

  // expected stream for a set of channels' words, by the voting rules
  function automatic void expect_stream(input logic [3:0] m,
                                        input logic [15:0] w [4][$],
                                        input logic [3:0] flip,
                                        ref logic exp [$]);
    logic prev;
    int n;
    prev = last_vbr;   // VBR is not cleared between operations
    n = $countones(m);
    exp.delete();
    for (int k = 0; k < w[0].size(); k++) begin
      for (int t = 0; t < 17; t++) begin
        int ones;
        logic v;
        ones = 0;
        for (int c = 0; c < 4; c++) if (m[c]) begin
          logic b;
          b = (t < 16) ? w[c][k][15 - t] : (wpar(w[c][k]) ^ flip[c]);
          ones += b;
        end
        v = prev;
        if (n == 1) v = (ones == 1);
        else if (n == 2) begin if (ones == 2) v = 1; else if (ones == 0) v = 0; end
        else if (n == 3) v = (ones >= 2);
        else begin if (ones >= 3) v = 1; else if (ones <= 1) v = 0; end
        exp.push_back(v);
        prev = v;
      end
    end
  endfunction

  // computers whose bits ever differ from the voted stream (not for the selector)
  function automatic logic [3:0] expect_dis(input logic [3:0] m,
                                            input logic [15:0] w [4][$],
                                            input logic [3:0] flip,
                                            input logic exp [$]);
    logic [3:0] d;
    d = '0;
    if ($countones(m) < 2) return d;
    for (int k = 0; k < w[0].size(); k++)
      for (int t = 0; t < 17; t++)
        for (int c = 0; c < 4; c++) if (m[c]) begin
          logic b;
          b = (t < 16) ? w[c][k][15 - t] : (wpar(w[c][k]) ^ flip[c]);
          if (b != exp[17*k + t]) d[c] = 1'b1;
        end
    return d;
  endfunction

  task automatic run_case(input string name, input logic [3:0] m,
                          input logic [15:0] w [4][$], input logic [3:0] flip,
                          input logic [3:0] exp_dis);
    logic exp [$];
    bit ok;
    lp_bits.delete();
    dis_seen = '0;
    @(negedge clk); used = m;
    expect_stream(m, w, flip, exp);
    for (int c = 0; c < 4; c++) if (m[c]) arm(c, w[c], flip[c]);
    for (int i = 0; i < 300 && busy !== 1'b1; i++) @(posedge clk);
    for (int i = 0; i < 300 && busy === 1'b1; i++) @(posedge clk);
    repeat (3) @(posedge clk);
    check(lp_bits.size() == exp.size(),
          $sformatf("%s: %0d bits sent, expected %0d", name, lp_bits.size(), exp.size()));
    ok = (lp_bits.size() == exp.size());
    if (ok) foreach (exp[i]) if (lp_bits[i] !== exp[i]) ok = 0;
    check(ok, $sformatf("%s: LP bit stream", name));
    check(dis_seen == exp_dis, $sformatf("%s: disagreements %b expected %b", name, dis_seen, exp_dis));
    if (exp.size() > 0) last_vbr = exp[exp.size() - 1];
    @(negedge clk);
    for (int c = 0; c < 4; c++) begin brbf[c] = 0; done[c] = 1; end
  endtask

  initial begin
    logic [15:0] w [4][$];
    int t0, t_start;
    for (int c = 0; c < 4; c++) begin brb[c] = 0; par_flip[c] = 0; nbytes_loaded[c] = 0; end
    repeat (3) @(posedge clk);
    pwron = 0;
    repeat (2) @(posedge clk);

    // selector on B, three words
    w[1] = '{16'hBEEF, 16'h1234, 16'h8001};
    w[0] = w[1]; w[2] = w[1]; w[3] = w[1];
    run_case("selector B", 4'b0010, w, 4'b0000, 4'b0000);

    // comparator A,C agreeing
    w[0] = '{16'hCAFE, 16'h0F0F};
    w[2] = w[0]; w[1] = w[0]; w[3] = w[0];
    run_case("comparator AC agree", 4'b0101, w, 4'b0000, 4'b0000);

    // comparator A,B with a differing bit: VBR holds
    w[0] = '{16'h00F0, 16'hFFFF};
    w[1] = '{16'h0070, 16'hFFFF};
    run_case("comparator AB differ", 4'b0011, w, 4'b0000, 4'b0001);

    // three-way A,B,D with D corrupted
    w[0] = '{16'h5A5A, 16'h1357, 16'h2468};
    w[1] = w[0];
    w[3] = '{16'h5A5B, 16'h9357, 16'h2468};
    run_case("3-way ABD, D wrong", 4'b1011, w, 4'b0000, 4'b1000);

    // four-way with C wrong and a 2-2 tie in one bit, parity fault on B
    w[0] = '{16'hF00D, 16'h0000};
    w[1] = '{16'hF00D, 16'h0001};
    w[2] = '{16'h0F0D, 16'h0001};
    w[3] = '{16'hF00D, 16'h0000};
    run_case("4-way", 4'b1111, w, 4'b0010, 4'b0110);

    // random cases: random mode, 1-4 words, some channels corrupted
    for (int it = 0; it < 200; it++) begin
      logic [3:0] m, fl, ed;
      logic [15:0] base [$];
      logic e [$];
      int nw;
      do m = 4'($urandom); while (m == 0);
      nw = 1 + $urandom % 4;
      base.delete();
      for (int k = 0; k < nw; k++) base.push_back(16'($urandom));
      fl = '0;
      for (int c = 0; c < 4; c++) begin
        w[c] = base;
        if ($urandom % 3 == 0) begin
          int k;
          k = $urandom % nw;
          w[c][k] = w[c][k] ^ 16'(1 << ($urandom % 16)) ^ (($urandom % 2) ? 16'($urandom) : 16'h0);
        end
        fl[c] = ($urandom % 8 == 0);
      end
      expect_stream(m, w, fl, e);
      ed = expect_dis(m, w, fl, e);
      run_case($sformatf("random %0d mode %b", it, m), m, w, fl, ed);
      repeat (2) @(posedge clk);
    end

    // comparator timeout: only A arrives
    @(negedge clk); used = 4'b0011;
    lp_bits.delete();
    w[0] = '{16'h1111};
    arm(0, w[0]);
    repeat (40) @(posedge clk);
    check(lp_bits.size() == 0 && !busy, "comparator gives up without the second channel");
    @(negedge clk); brbf[0] = 0; done[0] = 1;
    repeat (3) @(posedge clk);
    // late second channel inside the window: still votes
    w[0] = '{16'h2222}; w[1] = '{16'h2222};
    arm(0, w[0]);
    repeat (10) @(posedge clk);
    arm(1, w[1]);
    for (int i = 0; i < 20 && !busy; i++) @(posedge clk);
    check(busy === 1'b1, "comparator starts when the second channel is 10 bit times late");
    for (int i = 0; i < 40 && busy; i++) @(posedge clk);
    @(negedge clk); for (int c = 0; c < 4; c++) begin brbf[c] = 0; done[c] = 1; end

    // three-way timeout: C never arrives, voting starts 15 bit times later
    @(negedge clk); used = 4'b0111;
    lp_bits.delete();
    w[0] = '{16'h4444}; w[1] = '{16'h4444};
    arm(0, w[0]);
    arm(1, w[1]);
    t0 = cyc;
    for (int i = 0; i < 40 && !busy; i++) @(posedge clk);
    t_start = cyc;
    check(busy === 1'b1 && (t_start - t0) >= 15 && (t_start - t0) <= 17,
          $sformatf("3-way starts %0d bit times after majority", t_start - t0));
    for (int i = 0; i < 40 && busy; i++) @(posedge clk);
    repeat (3) @(posedge clk);
    check(lp_bits.size() == 17, $sformatf("one word of 17 bits, got %0d", lp_bits.size()));
    @(negedge clk); for (int c = 0; c < 4; c++) begin brbf[c] = 0; done[c] = 1; end

    // new mode aborts a running operation
    @(negedge clk); used = 4'b0001;
    w[0] = '{16'h7777, 16'h7777, 16'h7777};
    arm(0, w[0]);
    repeat (8) @(posedge clk);
    @(negedge clk); newmod = 1; @(negedge clk); newmod = 0;
    check(!busy, "new mode resets the voter");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
