// tb_vcs_matrix_section: self-checking test of the VCS matrix section.
//
// The testbench models the input channels (matrix interrupt with the control
// byte, then the data byte, in BRB) and the output channel (an output-ready
// pulse for every output request, recording each byte and its destination).
// It checks: power-on contents; loading R and P rows from three computers
// and the resulting three-way mode and operating mode register; the new-mode
// pulse; the P diagonal falling on a no-go signal and on two good computers'
// opinions and recovering; S matrix accumulation of voter disagreements, row
// clearing by command and by set-all; the byte streams of the three sample
// commands; early end of a sample on LP bus activity. Finally 60 set
// commands from random computers with random bytes are checked against a
// model of the R and P rows and of the diagonal majority rule, and the
// operating mode register against the mode logic.
module tb_vcs_matrix_section;
  import vcs_pkg::*;

  logic clk = 0, bit_en = 1, pwron = 1;
  logic [3:0] mi = '0;
  logic [3:0][7:0] brb = '0;
  logic [3:0] insrv, comp_nogo = '0;
  logic [3:0] used;
  logic newmod, stat_valid = 0;
  logic [3:0] disagree = '0;
  logic oreq;
  logic [7:0] mbr;
  logic [3:0] dest;
  logic or_in = 0, lp_abort = 0, rp_written;
  logic [15:0] p_mat, r_mat, s_mat;
  logic [3:0] om;
  mode_terms_t terms;
  int checks = 0, failures = 0;
  int newmod_count = 0;
  bit out_enable = 1;

  vcs_matrix_section dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) if (newmod) newmod_count++;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  // output channel model
  logic [7:0] got [$];
  logic [3:0] got_dest [$];
  initial forever begin
    @(negedge clk);
    if (oreq && out_enable) begin
      got.push_back(mbr);
      got_dest.push_back(dest);
      or_in = 1;
      @(negedge clk);
      or_in = 0;
      @(negedge clk);
    end
  end

  task automatic wait_insrv(input int c);
    for (int i = 0; i < 20; i++) begin
      @(posedge clk);
      if (insrv[c]) return;
    end
    check(0, $sformatf("no interrupt serviced for channel %0d", c));
  endtask

  task automatic cmd(input int c, input logic [2:0] op, input logic [7:0] data = 8'h00);
    @(negedge clk);
    brb[c] = {4'b0001, 1'b1, op};
    mi[c]  = 1;
    wait_insrv(c);
    @(negedge clk);
    mi[c] = 0;
    if (op == OP_SET_ALL || op == OP_SET_RP) begin
      brb[c] = data;
      @(negedge clk);
      mi[c] = 1;
      wait_insrv(c);
      @(negedge clk);
      mi[c] = 0;
    end
    repeat (2) @(posedge clk);
  endtask

  task automatic sample(input int c, input logic [2:0] op, input int n, output logic [7:0] b [$]);
    got.delete(); got_dest.delete();
    cmd(c, op);
    for (int i = 0; i < 100 && (got.size() < n || oreq); i++) @(posedge clk);
    repeat (4) @(posedge clk);
    b = got;
    check(got.size() == n, $sformatf("sample op %b: %0d bytes, expected %0d", op, got.size(), n));
    foreach (got_dest[i]) check(got_dest[i] == 4'(1 << c), "sample goes to the requesting computer");
  endtask

  initial begin
    logic [7:0] b [$];
    int nm;
    repeat (3) @(posedge clk);
    pwron = 0;
    @(posedge clk);
    check(p_mat == 16'hFFFF && r_mat == 0 && s_mat == 0, "power-on contents");
    check(used == 0, "no mode after power-on");

    // A, B, C ask for three-way A,B,C; all think the others good
    nm = newmod_count;
    cmd(0, OP_SET_RP, 8'b0111_1111);
    cmd(1, OP_SET_RP, 8'b0111_1111);
    cmd(2, OP_SET_ALL, 8'b0111_1111);
    check(r_mat == 16'h0777, $sformatf("R matrix %h", r_mat));
    check(used == 4'b0111 && terms.v3way[0], "three-way A,B,C selected");
    @(posedge clk);
    check(om == 4'b0111, "operating mode register");
    check(newmod_count - nm == 3, "new mode pulse per R load");

    // D's opinion row: D thinks A bad (bit 0 = 0)
    cmd(3, OP_SET_RP, 8'b0000_1110);
    check(p_mat[12] == 0 && p_mat[15] == 1, "D row: opinion stored, diagonal untouched");
    check(p_mat[0] == 1, "one opinion does not fail A");

    // B no-go: P6 drops, mode loses B; the remaining rows still give ABC? no
    @(negedge clk); comp_nogo[1] = 1;
    repeat (2) @(posedge clk);
    check(p_mat[5] == 0, "no-go clears the P diagonal");
    check(used == 4'b0111, "A and C still hold the three-way mode with D don't care");
    @(negedge clk); comp_nogo[1] = 0;
    repeat (2) @(posedge clk);
    check(p_mat[5] == 1, "P diagonal recovers when self test is good again");

    // A and C declare B bad
    cmd(0, OP_SET_RP, 8'b0111_1101);
    cmd(2, OP_SET_RP, 8'b0111_1101);
    repeat (2) @(posedge clk);
    check(p_mat[5] == 0, "two good computers vote B out");
    cmd(0, OP_SET_RP, 8'b0111_1111);
    repeat (2) @(posedge clk);
    check(p_mat[5] == 1, "B restored when A takes back its opinion");

    // S matrix: disagreement from B and C accumulate in every row
    @(negedge clk); stat_valid = 1; disagree = 4'b0010;
    @(negedge clk); disagree = 4'b0100;
    @(negedge clk); stat_valid = 0; disagree = 0;
    @(posedge clk);
    check(s_mat == 16'h6666, $sformatf("S matrix %h", s_mat));

    // sample S by computer C
    sample(2, OP_SAMPLE_S, 2, b);
    check(b.size() == 2 && b[0] == 8'h66 && b[1] == 8'h66, "sample S bytes");

    // clear S row of C, then set-all by A clears row A
    cmd(2, OP_CLR_S);
    check(s_mat == 16'h6066, $sformatf("clear S row C: %h", s_mat));
    cmd(0, OP_SET_ALL, 8'b0111_1111);
    check(s_mat == 16'h6060, $sformatf("set all clears S row A: %h", s_mat));

    // sample diagonal and mode by D
    sample(3, OP_SAMPLE_DIAG, 1, b);
    check(b.size() == 1 && b[0] == {om, p_mat[15], p_mat[10], p_mat[5], p_mat[0]} && b[0] == 8'h7F,
          $sformatf("sample diagonal byte %h", b.size() ? b[0] : 8'h00));

    // sample all by A
    sample(0, OP_SAMPLE_ALL, 6, b);
    check(b.size() == 6 && b[0] == r_mat[7:0] && b[1] == r_mat[15:8] && b[2] == p_mat[7:0]
          && b[3] == p_mat[15:8] && b[4] == s_mat[7:0] && b[5] == s_mat[15:8],
          "sample all byte order R, P, S");

    // LP activity ends a sample early
    got.delete();
    out_enable = 0;
    cmd(1, OP_SAMPLE_ALL);
    check(oreq, "output request raised");
    @(negedge clk); lp_abort = 1; @(negedge clk); lp_abort = 0;
    @(posedge clk);
    check(!oreq, "sample ended by LP bus activity");
    out_enable = 1;
    repeat (5) @(posedge clk);
    check(got.size() == 0, "no bytes after the abort");

    // random set commands against a model of the rows and of the diagonal
    // rule (cleared by two good others saying bad, set by two good others
    // saying good or when no other computer is good, held otherwise)
    begin
      logic [15:0] mp, mr;
      int bad;
      mp = p_mat; mr = r_mat; bad = 0;
      for (int it = 0; it < 60; it++) begin
        int c;
        logic [7:0] d;
        c = $urandom % 4;
        d = 8'($urandom);
        if ($urandom % 3 == 0) d[7:4] = 4'hF;
        cmd(c, OP_SET_RP, d);
        for (int j = 0; j < 4; j++) if (j != c) mp[4*c + j] = d[j];
        mr[4*c +: 4] = d[7:4];
        // settle the diagonal in the model
        for (int step = 0; step < 6; step++) begin
          logic [15:0] nx;
          nx = mp;
          for (int i = 0; i < 4; i++) begin
            int ng, ny, nn;
            ng = 0; ny = 0; nn = 0;
            for (int j = 0; j < 4; j++) if (j != i && mp[5*j]) begin
              ng++;
              if (mp[4*j + i]) ny++; else nn++;
            end
            if (nn >= 2) nx[5*i] = 1'b0;
            else if (ny >= 2 || ng == 0) nx[5*i] = 1'b1;
          end
          mp = nx;
        end
        repeat (3) @(posedge clk);
        checks++;
        if (p_mat !== mp || r_mat !== mr) begin
          failures++;
          if (bad++ < 5) $display("FAIL random set %0d: P %h R %h expected P %h R %h", it, p_mat, r_mat, mp, mr);
        end
        checks++;
        if (om !== used) begin
          failures++;
          $display("FAIL random set %0d: operating mode %b, mode logic %b", it, om, used);
        end
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
