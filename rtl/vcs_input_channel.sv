// vcs_input_channel: one of the four identical VCS input channels.
//
// The channel receives bytes from its computer bit-parallel, byte-serial,
// with odd parity as a ninth bit. Every operation starts with a control
// byte (bits 1-3 matrix operation, bit 4 type, bits 5-8 VCS address). A byte
// is latched into buffer register A (BRA) on the rising edge of the data
// strobe; the received parity (PAR1) is compared with the parity generated on
// the data (PAR2) and a mismatch raises bad_parity for two bit times, after
// which the computer may resend the byte. A control byte whose address bit for
// this VCS is zero is ignored.
//
// Voter operation (type 0): the channel requests bytes with a one bit-time
// next_byte pulse. The first byte goes straight to buffer register B (BRB)
// and sets BRB full (BRBF); later bytes wait in BRA until the voter section
// pulses load_brb. The voter shifts BRB out MSB first with shift. For each
// 16-bit word the channel forms one odd parity bit from the two byte parities
// (PAR4 = 1 when they are equal) for the voter to send as the 17th bit. When
// end_of_msg has been seen, the channel sets DONE after the second byte of
// the last word has gone to BRB (or at once if it is waiting for a byte) and
// returns to idle. End of message raised on its own (without a byte) while a
// word is still waiting for the voter abandons the message: DONE is set and
// BRBF cleared.
//
// Matrix operation (type 1): the control byte goes to BRB and the matrix
// interrupt (mi) is raised; for the two set operations a data byte is first
// read, and after the first interrupt serviced (insrv) pulse the data byte
// is moved to BRB and the interrupt raised once more.
//
// All registers advance only when bit_en is high (one bit time); pwron is a
// synchronous power-on reset. The sequence and register names follow the
// specification; the exact handshake cycle timing, the end-of-message rules
// and the edge detection of the data strobe are this design's own choices.
module vcs_input_channel
  import vcs_pkg::*;
#(
  parameter int unsigned VCS_ID = 0     // which address bit (5..8) selects this VCS
) (
  input  logic       clk,
  input  logic       bit_en,
  input  logic       pwron,
  // computer interface
  input  logic [7:0] data_in,
  input  logic       parity_in,
  input  logic       data_strobe,
  input  logic       end_of_msg,
  output logic       next_byte,
  output logic       bad_parity,
  // voter section
  input  logic       shift,
  input  logic       load_brb,
  output logic       brbf,
  output logic       done,
  output logic       brb_msb,
  output logic       par4,
  // matrix section
  input  logic       insrv,
  output logic       mi,
  output logic [7:0] brb
);

  typedef enum logic [3:0] {
    S_IDLE, S_CHK, S_PBAD,
    S_V_WAIT, S_V_CHK, S_V_PBAD, S_V_HOLD,
    S_M_WAIT, S_M_CHK, S_M_PBAD, S_M_INT1, S_M_GAP, S_M_INT2, S_R_INT
  } state_e;

  state_e        state;
  logic [7:0]    bra;
  logic          par1, par2, par3;
  logic          strobe_q;
  logic          half;        // 0: next data byte is the first of a word
  logic          first_word;
  logic          end_seen;
  logic [1:0]    pbad_cnt;
  control_byte_t cb;

  wire strobe_rise = data_strobe & ~strobe_q;
  wire par_ok      = (par1 == par2);
  assign cb        = control_byte_t'(bra);
  assign brb_msb   = brb[7];

  always_ff @(posedge clk) begin
    if (pwron) begin
      state      <= S_IDLE;
      bra        <= '0;
      brb        <= '0;
      par1       <= 1'b0;
      par2       <= 1'b0;
      par3       <= 1'b0;
      par4       <= 1'b0;
      strobe_q   <= 1'b0;
      half       <= 1'b0;
      first_word <= 1'b0;
      end_seen   <= 1'b0;
      pbad_cnt   <= '0;
      next_byte  <= 1'b0;
      bad_parity <= 1'b0;
      brbf       <= 1'b0;
      done       <= 1'b1;
      mi         <= 1'b0;
    end else if (bit_en) begin
      strobe_q  <= data_strobe;
      next_byte <= 1'b0;
      if (strobe_rise) begin
        bra  <= data_in;
        par1 <= parity_in;
        par2 <= odd_parity(data_in);
      end
      // the voter shifts BRB one bit per bit time
      if (shift) begin
        brb  <= {brb[6:0], 1'b0};
        brbf <= 1'b0;
      end

      unique case (state)
        S_IDLE: if (strobe_rise) state <= S_CHK;

        S_CHK: begin
          if (!par_ok) begin
            bad_parity <= 1'b1;
            pbad_cnt   <= 2'(BAD_PAR_TIME - 1);
            state      <= S_PBAD;
          end else if (!cb.addr[VCS_ID]) begin
            state <= S_IDLE;
          end else if (!cb.matrix) begin
            next_byte  <= 1'b1;
            done       <= 1'b0;
            half       <= 1'b0;
            first_word <= 1'b1;
            end_seen   <= 1'b0;
            state      <= S_V_WAIT;
          end else begin
            brb <= bra;
            if (cb.op == OP_SET_ALL || cb.op == OP_SET_RP) begin
              next_byte <= 1'b1;
              state     <= S_M_WAIT;
            end else begin
              mi    <= 1'b1;
              state <= S_R_INT;
            end
          end
        end

        S_PBAD: begin
          if (pbad_cnt == 0) begin
            bad_parity <= 1'b0;
            state      <= S_IDLE;
          end else pbad_cnt <= pbad_cnt - 1'b1;
        end

        // ---------------- voter operation ----------------
        S_V_WAIT: begin
          if (strobe_rise) begin
            if (end_of_msg) end_seen <= 1'b1;
            state <= S_V_CHK;
          end else if (end_of_msg) begin
            done  <= 1'b1;          // message ends (or is abandoned) here
            brbf  <= 1'b0;
            state <= S_IDLE;
          end
        end

        S_V_CHK: begin
          if (!par_ok) begin
            bad_parity <= 1'b1;
            pbad_cnt   <= 2'(BAD_PAR_TIME - 1);
            state      <= S_V_PBAD;
          end else if (!half) begin
            par3 <= par1;
            half <= 1'b1;
            if (first_word) begin
              brb        <= bra;
              brbf       <= 1'b1;
              first_word <= 1'b0;
              next_byte  <= 1'b1;
              state      <= S_V_WAIT;
            end else state <= S_V_HOLD;
          end else begin
            par4  <= (par3 == par1);
            half  <= 1'b0;
            state <= S_V_HOLD;
          end
        end

        S_V_PBAD: begin
          if (pbad_cnt == 0) begin
            bad_parity <= 1'b0;
            state      <= S_V_WAIT;
          end else pbad_cnt <= pbad_cnt - 1'b1;
        end

        S_V_HOLD: begin
          if (end_of_msg) end_seen <= 1'b1;
          if (end_of_msg && brbf && !end_seen) begin
            // end of message raised on its own while the voter has not
            // started: the message is abandoned
            done  <= 1'b1;
            brbf  <= 1'b0;
            state <= S_IDLE;
          end else if (load_brb) begin
            brb <= bra;
            if (!half && (end_seen || end_of_msg)) begin
              done  <= 1'b1;       // second byte of the last word is in BRB
              state <= S_IDLE;
            end else begin
              next_byte <= 1'b1;
              state     <= S_V_WAIT;
            end
          end
        end

        // ---------------- matrix operations ----------------
        S_M_WAIT: begin
          if (strobe_rise) state <= S_M_CHK;
          else if (end_of_msg) state <= S_IDLE;
        end

        S_M_CHK: begin
          if (!par_ok) begin
            bad_parity <= 1'b1;
            pbad_cnt   <= 2'(BAD_PAR_TIME - 1);
            state      <= S_M_PBAD;
          end else begin
            mi    <= 1'b1;
            state <= S_M_INT1;
          end
        end

        S_M_PBAD: begin
          if (pbad_cnt == 0) begin
            bad_parity <= 1'b0;
            state      <= S_M_WAIT;
          end else pbad_cnt <= pbad_cnt - 1'b1;
        end

        S_M_INT1: if (insrv) begin
          brb   <= bra;
          mi    <= 1'b0;
          state <= S_M_GAP;
        end

        S_M_GAP: begin
          mi    <= 1'b1;
          state <= S_M_INT2;
        end

        S_M_INT2, S_R_INT: if (insrv) begin
          mi    <= 1'b0;
          state <= S_IDLE;
        end

        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
