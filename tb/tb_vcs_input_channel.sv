// tb_vcs_input_channel: self-checking test of one VCS input channel.
//
// The testbench plays both the computer (bytes with odd parity on a data
// strobe, answering each next_byte request two bit times later) and the
// voter and matrix sections (shift / load_brb pattern of a 17-bit LP word,
// interrupt-serviced pulses). It checks: a control byte for another VCS is
// ignored; a byte with bad parity holds bad_parity for exactly two bit times;
// a two-word voter message is delivered MSB first with the right 17th
// (word parity) bit and DONE is set after the last word; a data byte with
// bad parity is retransmitted; a set-matrix command raises the matrix
// interrupt twice with the control byte and then the data byte in BRB; a
// sample command raises it once; 30 random voter messages of one to five
// random words (end of message with the last byte, so one-word messages end
// while their word still waits for the voter) come out word by word with the
// right parity bit and DONE.
module tb_vcs_input_channel;
  import vcs_pkg::*;

  logic clk = 0, bit_en = 1, pwron = 1;
  logic [7:0] data_in = '0;
  logic parity_in = 0, data_strobe = 0, end_of_msg = 0;
  logic next_byte, bad_parity;
  logic shift = 0, load_brb = 0, brbf, done, brb_msb, par4;
  logic insrv = 0, mi;
  logic [7:0] brb;
  int checks = 0, failures = 0;
  int cyc = 0;

  vcs_input_channel #(.VCS_ID(0)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL [%0d] %s", cyc, what);
    end
  endtask

  // computer sends one byte; good=0 corrupts the parity
  task automatic send(input logic [7:0] b, input bit good = 1, input bit eom = 0);
    @(negedge clk);
    data_in     = b;
    parity_in   = good ? odd_parity(b) : ~odd_parity(b);
    data_strobe = 1;
    end_of_msg  = eom;
    @(negedge clk);
    @(negedge clk);
    data_strobe = 0;
  endtask

  task automatic wait_next_byte(input int limit, output bit got);
    got = 0;
    for (int i = 0; i < limit; i++) begin
      @(posedge clk);
      if (next_byte) begin got = 1; break; end
    end
  endtask

  // voter side: one 17-bit word; returns the bits seen
  task automatic voter_word(output logic [16:0] w);
    for (int t = 0; t < 17; t++) begin
      @(negedge clk);
      w[16 - t] = (t == 16) ? par4 : brb_msb;
      shift    = !(t == 7 || t == 16);
      load_brb = (t == 7 || t == 16);
    end
    @(negedge clk);
    shift = 0; load_brb = 0;
  endtask

  // computer process: answer every next_byte with the next queued byte
  logic [7:0] q [$];
  bit         q_eom_last = 0;
  initial begin
    forever begin
      @(posedge clk);
      if (next_byte && q.size() > 0) begin
        logic [7:0] b;
        b = q.pop_front();
        repeat (1) @(posedge clk);
        send(b, 1, (q.size() == 0) && q_eom_last);
      end
    end
  end

  initial begin
    bit got;
    logic [16:0] w;
    int hi;
    repeat (3) @(posedge clk);
    pwron = 0;

    // 1. control byte for another VCS (address bit 6): ignored
    send(8'b0010_0000);
    wait_next_byte(12, got);
    check(!got, "control byte for another VCS must be ignored");

    // 2. bad parity on a control byte: bad_parity for two bit times
    send(8'b0001_0000, 0);
    hi = 0;
    repeat (10) begin @(posedge clk); if (bad_parity) hi++; end
    check(hi == BAD_PAR_TIME, $sformatf("bad_parity held %0d bit times", hi));

    // 3. voter operation, two words
    q = '{8'hA5, 8'h3C, 8'h0F, 8'h81};
    q_eom_last = 1;
    send(8'b0001_0000);                       // address VCS 0, type voter
    wait (brbf === 1'b1);
    @(negedge clk);
    check(brb == 8'hA5, $sformatf("first byte in BRB, got %h", brb));
    check(!done, "DONE clear during the message");
    repeat (6) @(posedge clk);                // the second byte has arrived
    voter_word(w);
    check(w == {8'hA5, 8'h3C, ~^{8'hA5, 8'h3C}},
          $sformatf("word 1 = %h", w));
    repeat (6) @(posedge clk);
    voter_word(w);
    check(w == {8'h0F, 8'h81, ~^{8'h0F, 8'h81}},
          $sformatf("word 2 = %h", w));
    check(done, "DONE after the last word");
    @(negedge clk); end_of_msg = 0;

    // 4. data byte with bad parity is retransmitted
    q_eom_last = 0;
    send(8'b0001_0000);
    wait_next_byte(10, got);
    check(got, "next_byte after voter control byte");
    repeat (1) @(posedge clk);
    send(8'h55, 0);
    hi = 0;
    repeat (6) begin @(posedge clk); if (bad_parity) hi++; end
    check(hi == BAD_PAR_TIME, "bad_parity on data byte");
    check(!brbf, "bad byte not accepted");
    send(8'h55, 1);
    repeat (3) @(posedge clk);
    check(brbf && brb == 8'h55, "retransmitted byte accepted");
    // abandon the message with end of message
    @(negedge clk); end_of_msg = 1;
    repeat (3) @(posedge clk);
    @(negedge clk); end_of_msg = 0;
    check(done && !brbf, "end of message abandons an unstarted message");

    // 5. set R and P: two matrix interrupts
    send(8'b0001_1001);                       // VCS 0, matrix, op 001
    wait_next_byte(10, got);
    check(got, "next_byte after set command");
    send(8'h5A);
    for (int i = 0; i < 10 && !mi; i++) @(posedge clk);
    check(mi && brb == 8'h19, $sformatf("first interrupt with control byte %h", brb));
    @(negedge clk); insrv = 1; @(negedge clk); insrv = 0;
    check(!mi, "interrupt dropped after service");
    for (int i = 0; i < 5 && !mi; i++) @(posedge clk);
    check(mi && brb == 8'h5A, $sformatf("second interrupt with data byte %h", brb));
    @(negedge clk); insrv = 1; @(negedge clk); insrv = 0;
    repeat (3) @(posedge clk);
    check(!mi, "set operation finished");

    // 6. sample all: one interrupt, no data byte
    send(8'b0001_1100);
    for (int i = 0; i < 10 && !mi; i++) @(posedge clk);
    check(mi && brb == 8'h1C, "sample command interrupt");
    check(!next_byte, "no data requested for sample");
    @(negedge clk); insrv = 1; @(negedge clk); insrv = 0;
    repeat (3) @(posedge clk);
    check(!mi, "sample request finished");

    // 7. random voter messages: 1-5 words of random data
    for (int it = 0; it < 30; it++) begin
      logic [15:0] words [$];
      int nw;
      bit ok;
      nw = 1 + $urandom % 5;
      words.delete();
      q.delete();
      for (int k = 0; k < nw; k++) begin
        words.push_back(16'($urandom));
        q.push_back(words[k][15:8]);
        q.push_back(words[k][7:0]);
      end
      q_eom_last = 1;
      send(8'b0001_0000);
      for (int i = 0; i < 20 && brbf !== 1'b1; i++) @(posedge clk);
      check(brbf === 1'b1 && brb == words[0][15:8], $sformatf("random message %0d: first byte in BRB", it));
      ok = 1;
      for (int k = 0; k < nw; k++) begin
        repeat (6) @(posedge clk);
        voter_word(w);
        if (w != {words[k], ~^words[k]}) begin
          ok = 0;
          $display("random message %0d word %0d = %h expected %h", it, k, w, {words[k], ~^words[k]});
        end
      end
      check(ok, $sformatf("random message %0d: %0d words with parity", it, nw));
      check(done, $sformatf("random message %0d: DONE at the end", it));
      @(negedge clk); end_of_msg = 0;
      repeat (4) @(posedge clk);
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
