// vcs_voter_section: bit-serial voter of the VCS.
//
// The matrix section names the computers taking part (`used`); their number
// sets the mode: one = selector, two = comparator, three or four = majority
// voting. From idle the voter starts an operation when
//   selector  : the selected channel's BRB full (BRBF) is set;
//   comparator: both BRBF are set; after the first one a timer runs, and if
//               it reaches 15 bit times first the voter gives up and waits
//               until no involved BRBF is set (the specification returns
//               straight to idle; waiting keeps the stale word from
//               restarting the timer);
//   3/4-way   : all involved BRBF are set, or two of them (of three or of
//               four) are set and the timer then reaches 15 bit times.
// An LP word takes 17 bit times. In bit time t=0..15 the MSB of each
// involved channel's BRB is voted and BRB shifted; at t=7 the channel is told
// to load the second byte into BRB instead of shifting, at t=16 the channel
// parity bits (PAR4) are voted and the first byte of the next word loaded.
// The voted bit is held in the voter buffer register (VBR) and sent on the
// LP bus one bit time later. Voting rules: comparator and four-way keep VBR
// unchanged when there is no agreement (1-1 or 2-2); three-way takes the
// majority. After each word the voter stops when the selected channel
// (selector), both channels (comparator) or a majority of the channels
// (3/4-way) report DONE, and otherwise continues with the next word.
// In every voting mode but the selector, each involved computer whose bit
// differs from the voted bit is reported on `disagree` with `stat_valid`
// (the STA5..STA8 status of the specification) for the S matrix. A new-mode
// pulse resets the voter to idle. Registers advance when bit_en is high.
// The modes, the 15-bit-time window and the VBR rules follow the
// specification; the exact bit times of the load requests are this design's.
module vcs_voter_section
  import vcs_pkg::*;
(
  input  logic       clk,
  input  logic       bit_en,
  input  logic       pwron,
  // from the matrix section
  input  logic [3:0] used,
  input  logic       newmod,
  // from / to the input channels
  input  logic [3:0] brbf,
  input  logic [3:0] done,
  input  logic [3:0] data_bit,   // BRB MSB of each channel
  input  logic [3:0] par4,
  output logic [3:0] shift,
  output logic [3:0] load_brb,
  // LP data bus transmitter
  output logic       lp_tx_valid,
  output logic       lp_tx_data,
  // status to the matrix section
  output logic       stat_valid,
  output logic [3:0] disagree,
  output logic       busy
);

  typedef enum logic [1:0] {V_IDLE, V_WAIT, V_LOCK, V_RUN} vstate_e;

  vstate_e     state;
  logic [3:0]  mask;       // involved channels, latched at start
  logic [4:0]  bitcnt;     // 0..16 within the word
  logic [3:0]  timer;
  logic        vbr;

  logic [2:0]  n_used, n_full, n_done;
  logic [3:0]  bits;
  logic        vote_bit;
  logic        start_now, any_full, maj_full, all_full, finished;

  assign n_used   = count4(used);
  assign n_full   = count4(brbf & used);
  assign any_full = |(brbf & used);
  assign all_full = ((brbf & used) == used) && (used != 0);
  assign maj_full = (2 * n_full >= n_used);  // 2 of 3, 2 of 4
  assign n_done   = count4(done & mask);
  assign busy     = (state == V_RUN);

  // bits being voted this bit time
  assign bits = (bitcnt == 5'(FRAME_BITS - 1)) ? (par4 & mask) : (data_bit & mask);

  always_comb begin
    logic [2:0] ones, zeros, n;
    n        = count4(mask);
    ones     = count4(bits & mask);
    zeros    = n - ones;
    vote_bit = vbr;
    if (n == 1)                       vote_bit = |bits;
    else if (n == 2) begin
      if (ones == 2) vote_bit = 1'b1; else if (zeros == 2) vote_bit = 1'b0;
    end else if (n == 3)              vote_bit = (ones >= 2);
    else begin
      if (ones >= 3) vote_bit = 1'b1; else if (zeros >= 3) vote_bit = 1'b0;
    end
  end

  always_comb begin
    logic [2:0] n;
    n = count4(mask);
    if (n == 1)      finished = |(done & mask);
    else if (n == 2) finished = ((done & mask) == mask);
    else             finished = (2 * n_done > n);
  end

  // start condition from idle (or from the waiting state)
  always_comb begin
    unique case (n_used)
      3'd1:        start_now = any_full;
      3'd2, 3'd3, 3'd4: start_now = all_full;
      default:     start_now = 1'b0;
    endcase
  end

  always_comb begin
    shift    = '0;
    load_brb = '0;
    if (state == V_RUN) begin
      if (bitcnt == 5'd7 || bitcnt == 5'(FRAME_BITS - 1)) load_brb = mask;
      else                                            shift    = mask;
    end
  end

  always_ff @(posedge clk) begin
    if (pwron) begin
      state       <= V_IDLE;
      mask        <= '0;
      bitcnt      <= '0;
      timer       <= '0;
      vbr         <= 1'b0;
      lp_tx_valid <= 1'b0;
      lp_tx_data  <= 1'b0;
      stat_valid  <= 1'b0;
      disagree    <= '0;
    end else if (bit_en) begin
      lp_tx_valid <= 1'b0;
      stat_valid  <= 1'b0;
      if (newmod) begin
        state <= V_IDLE;
      end else begin
        unique case (state)
          V_IDLE: begin
            timer  <= '0;
            bitcnt <= '0;
            mask   <= used;
            if (start_now) state <= V_RUN;
            else if (n_used == 3'd2 && any_full) state <= V_WAIT;
            else if (n_used >= 3'd3 && maj_full) state <= V_WAIT;
          end
          V_WAIT: begin
            mask <= used;
            if (start_now) state <= V_RUN;
            else if (timer == 4'(VOTE_TIMEOUT - 1)) begin
              if (n_used == 3'd2) state <= V_LOCK;
              else                state <= V_RUN;
            end
            timer <= timer + 1'b1;
          end
          V_LOCK: if (!any_full) state <= V_IDLE;
          V_RUN: begin
            vbr         <= vote_bit;
            lp_tx_valid <= 1'b1;
            lp_tx_data  <= vote_bit;
            stat_valid  <= (count4(mask) > 1);
            disagree    <= (count4(mask) > 1) ? (mask & (bits ^ {4{vote_bit}})) : 4'b0;
            if (bitcnt == 5'(FRAME_BITS - 1)) begin
              bitcnt <= '0;
              if (finished) state <= V_IDLE;
            end else bitcnt <= bitcnt + 1'b1;
          end
          default: state <= V_IDLE;
        endcase
      end
    end
  end

endmodule
