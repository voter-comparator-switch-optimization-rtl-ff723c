// tb_vcs_mode_logic: directed check of the VCS voting-mode decision.
//
// Each case sets the P diagonal (computer good/failed) and the four R rows
// and compares the resulting set of used computers with a value worked out
// by hand from the mode rules (four-way needs three good requests; three-way
// needs all three members, or two when the fourth computer is failed or
// don't care; comparator needs both members and at least one other computer
// failed or don't care; selector needs every other computer failed or don't
// care). It also checks that at most one of the fifteen terms is true and
// that every term was produced at least once. Then it runs every
// combination of P diagonal and R matrix (16 x 65536 cases, with random
// off-diagonal P bits, which must not matter) against a reference model that
// works per candidate set of computers instead of per term: a set of n
// computers is selected when enough good members request exactly that set
// and enough non-members are failed or don't care; the smallest selected set
// is the one used.
module tb_vcs_mode_logic;
  import vcs_pkg::*;

  logic [15:0] p, r;
  mode_terms_t terms;
  logic [3:0]  used;
  int checks = 0, failures = 0;
  logic [14:0] seen = '0;

  vcs_mode_logic dut (.p(p), .r(r), .terms(terms), .used(used));

  // good: P diagonal per computer; rows: A in [3:0] ... D in [15:12]
  task automatic tcase(input string name, input logic [3:0] good,
                       input logic [3:0] ra, input logic [3:0] rb,
                       input logic [3:0] rc, input logic [3:0] rd,
                       input logic [3:0] exp);
    p = '1;
    for (int i = 0; i < 4; i++) p[5*i] = good[i];
    r = {rd, rc, rb, ra};
    #1;
    checks++;
    if (used !== exp) begin
      failures++;
      $display("FAIL %s: used=%b expected %b", name, used, exp);
    end
    checks++;
    if ($countones(terms) > 1) begin
      failures++;
      $display("FAIL %s: several mode terms true %b", name, terms);
    end
    seen |= terms;
  endtask

  // reference: all fifteen terms from the candidate sets
  function automatic mode_terms_t ref_terms(input logic [3:0] good, input logic [15:0] rows);
    mode_terms_t t;
    t = '0;
    for (int st = 1; st < 16; st++) begin
      int n, nreq, ndc_out, miss, pi;
      bit sel;
      n = 0; nreq = 0; ndc_out = 0; miss = 0;
      for (int i = 0; i < 4; i++) begin
        logic [3:0] row;
        row = rows[4*i +: 4];
        if (st[i]) begin
          n++;
          if (good[i] && row == 4'(st)) nreq++;
        end else begin
          miss = i;
          if (!good[i] || row == 4'h0) ndc_out++;
        end
      end
      case (n)
        4: sel = (nreq >= 3);
        3: sel = (nreq == 3) || (nreq == 2 && ndc_out == 1);
        2: sel = (nreq == 2) && (ndc_out >= 1);
        default: sel = (nreq == 1) && (ndc_out == 3);
      endcase
      if (sel) begin
        case (n)
          4: t.v4way = 1'b1;
          3: t.v3way[3 - miss] = 1'b1;
          2: begin
            case (st)
              4'b0011: pi = 0;  4'b0101: pi = 1;  4'b1001: pi = 2;
              4'b0110: pi = 3;  4'b1010: pi = 4;  default: pi = 5;
            endcase
            t.comp[pi] = 1'b1;
          end
          default: for (int i = 0; i < 4; i++) if (st[i]) t.slct[i] = 1'b1;
        endcase
      end
    end
    return t;
  endfunction

  function automatic logic [3:0] ref_used(input logic [3:0] good, input logic [15:0] rows);
    logic [3:0] u;
    int best;
    mode_terms_t t;
    u = '0; best = 5;
    t = ref_terms(good, rows);
    // candidate sets in the same order as the term bits
    if (t.v4way) begin u = 4'b1111; best = 4; end
    for (int k = 0; k < 4; k++) if (t.v3way[k] && best >= 3) begin u = ~(4'b1000 >> k); best = 3; end
    for (int k = 0; k < 6; k++) if (t.comp[k] && best >= 2) begin
      logic [3:0] pr [6];
      pr = '{4'b0011, 4'b0101, 4'b1001, 4'b0110, 4'b1010, 4'b1100};
      u = pr[k]; best = 2;
    end
    for (int k = 0; k < 4; k++) if (t.slct[k]) begin u = 4'(1 << k); best = 1; end
    return u;
  endfunction

  task automatic exhaustive();
    int bad;
    bad = 0;
    for (int g = 0; g < 16; g++)
      for (int rr = 0; rr < 65536; rr++) begin
        mode_terms_t et;
        logic [3:0]  eu;
        p = 16'($urandom);
        for (int i = 0; i < 4; i++) p[5*i] = g[i];
        r = 16'(rr);
        #1;
        et = ref_terms(4'(g), 16'(rr));
        eu = ref_used(4'(g), 16'(rr));
        checks++;
        if (terms !== et || used !== eu) begin
          failures++;
          if (bad++ < 10)
            $display("FAIL good=%b r=%h: terms=%b used=%b expected %b %b",
                     4'(g), 16'(rr), terms, used, et, eu);
        end
      end
  endtask

  initial begin
    // four-way
    tcase("4way all",        4'b1111, 4'hF, 4'hF, 4'hF, 4'hF, 4'b1111);
    tcase("4way 3 of 4",     4'b1111, 4'hF, 4'hF, 4'hF, 4'h1, 4'b1111);
    tcase("4way A failed",   4'b1110, 4'hF, 4'hF, 4'hF, 4'hF, 4'b1111);
    tcase("4way 2 good",     4'b1100, 4'hF, 4'hF, 4'hF, 4'hF, 4'b0000);
    tcase("4way 2 requests", 4'b1111, 4'hF, 4'hF, 4'h0, 4'h0, 4'b0000);
    // three-way, each set
    tcase("3way ABC",        4'b1111, 4'h7, 4'h7, 4'h7, 4'h0, 4'b0111);
    tcase("3way ABD",        4'b1111, 4'hB, 4'hB, 4'h0, 4'hB, 4'b1011);
    tcase("3way ACD",        4'b1111, 4'hD, 4'h0, 4'hD, 4'hD, 4'b1101);
    tcase("3way BCD",        4'b1111, 4'h0, 4'hE, 4'hE, 4'hE, 4'b1110);
    tcase("3way ABC D fail", 4'b0111, 4'h7, 4'h7, 4'h3, 4'hF, 4'b0111);
    tcase("3way 2, D votes", 4'b1111, 4'h7, 4'h7, 4'h0, 4'hF, 4'b0000);
    tcase("3way C failed",   4'b1011, 4'h7, 4'h7, 4'h7, 4'h0, 4'b0111);
    // comparator, each pair
    tcase("comp AB",         4'b1111, 4'h3, 4'h3, 4'h0, 4'h0, 4'b0011);
    tcase("comp AC",         4'b1111, 4'h5, 4'h0, 4'h5, 4'hC, 4'b0101);
    tcase("comp AD",         4'b0111 | 4'b1000, 4'h9, 4'h0, 4'h0, 4'h9, 4'b1001);
    tcase("comp BC",         4'b1110, 4'hF, 4'h6, 4'h6, 4'h0, 4'b0110);
    tcase("comp BD",         4'b1111, 4'h0, 4'hA, 4'h0, 4'hA, 4'b1010);
    tcase("comp CD",         4'b1100, 4'h3, 4'h3, 4'hC, 4'hC, 4'b1100);
    tcase("comp tie",        4'b1111, 4'h3, 4'h3, 4'hC, 4'hC, 4'b0000);
    tcase("comp all ask AB", 4'b1111, 4'h3, 4'h3, 4'h3, 4'h3, 4'b0000);
    tcase("comp one asks",   4'b1111, 4'h3, 4'h0, 4'h0, 4'h0, 4'b0000);
    // selector, each computer
    tcase("slct A",          4'b1111, 4'h1, 4'h0, 4'h0, 4'h0, 4'b0001);
    tcase("slct B",          4'b0010, 4'hF, 4'h2, 4'hF, 4'hF, 4'b0010);
    tcase("slct C",          4'b1111, 4'h0, 4'h0, 4'h4, 4'h0, 4'b0100);
    tcase("slct D",          4'b1001, 4'h0, 4'h3, 4'h3, 4'h8, 4'b1000);
    tcase("slct conflict",   4'b1111, 4'h1, 4'h2, 4'h0, 4'h0, 4'b0000);
    tcase("slct own failed", 4'b1110, 4'h1, 4'h0, 4'h0, 4'h0, 4'b0000);
    tcase("all dont care",   4'b1111, 4'h0, 4'h0, 4'h0, 4'h0, 4'b0000);

    exhaustive();

    checks++;
    if (seen !== '1) begin
      failures++;
      $display("FAIL not every mode term was produced: %b", seen);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
