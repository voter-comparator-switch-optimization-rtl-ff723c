// vcs_matrix_section: P, R and S matrices and their command sequencer.
//
// P (computer status), R (requested voting mode) and S (voting status) are
// 4x4 bit matrices; row i belongs to computer i. The mode decision
// (vcs_mode_logic) turns R, masked by the P diagonal, into the set of
// computers the voter uses; that set is also copied every bit time into the
// four-bit operating mode register (OM).
//
// P diagonal: every bit time, element (i,i) is cleared when computer i's
// no-go line is active or when two good computers both mark it bad, and is
// set when its self test is good and two good computers both mark it good,
// or when no other computer is good. Power-on sets all of P to one and clears
// R and S.
//
// Command sequencer: in the scanning mode a four-state counter tests one
// matrix interrupt (mi) per bit time. On an interrupt the counter holds, the
// operation code (BRB bits 1-3 of that channel) is stored and insrv is
// pulsed for one bit time. Then
//   set R,P (001) / set all (000): wait for the same interrupt, copy BRB to
//     the matrix buffer register (MBR), pulse insrv, load R row from bits
//     5-8 and the three off-diagonal P elements of the row from bits 1-4,
//     pulse newmod to the voter; 000 also clears the S row;
//   clear S (011): clear the S row;
//   sample all (100): send R1-8, R9-16, P1-8, P9-16, S1-8, S9-16;
//   sample diagonal (110): send P1, P6, P11, P16, OM1-OM4 as one byte;
//   sample S (111): send S1-8, S9-16.
// Each sample byte is placed in MBR with output request (oreq) set; the
// output channel answers with a one bit-time output ready (or_in) pulse. LP
// bus activity (lp_abort) ends a sample early. While the sequencer is
// scanning (not serving a command) the S matrix ORs the voter's disagreement
// bits into all four rows; disagreements reported while a command is being
// served are not recorded, as in the specification's equations. Registers advance when bit_en is
// high. Opcodes, byte order and P/R bit placement follow the specification;
// the state encoding and handshake timing are this design's.
module vcs_matrix_section
  import vcs_pkg::*;
(
  input  logic            clk,
  input  logic            bit_en,
  input  logic            pwron,
  // input channels
  input  logic [3:0]      mi,
  input  logic [3:0][7:0] brb,
  output logic [3:0]      insrv,
  input  logic [3:0]      comp_nogo,
  // voter section
  output logic [3:0]      used,
  output logic            newmod,
  input  logic            stat_valid,
  input  logic [3:0]      disagree,
  // output channel
  output logic            oreq,
  output logic [7:0]      mbr,
  output logic [3:0]      dest,
  input  logic            or_in,
  input  logic            lp_abort,
  output logic            rp_written,
  // visibility
  output logic [15:0]     p_mat,
  output logic [15:0]     r_mat,
  output logic [15:0]     s_mat,
  output logic [3:0]      om,
  output mode_terms_t     terms
);

  typedef enum logic [2:0] {M_SCAN, M_DISPATCH, M_SET_WAIT, M_SET_APPLY, M_SAMPLE} mstate_e;

  mstate_e     state;
  logic [1:0]  mic;        // interrupt scanning counter
  opcode_e     opc;
  logic [2:0]  idx;        // sample byte index
  logic [2:0]  last;       // last sample byte index

  vcs_mode_logic u_mode (.p(p_mat), .r(r_mat), .terms(terms), .used(used));

  // byte k of a sample sequence
  function automatic logic [7:0] sample_byte(input opcode_e op, input logic [2:0] k,
                                             input logic [15:0] p, input logic [15:0] r,
                                             input logic [15:0] s, input logic [3:0] o);
    logic [7:0] b;
    b = '0;
    unique case (op)
      OP_SAMPLE_ALL: unique case (k)
        3'd0: b = r[7:0];
        3'd1: b = r[15:8];
        3'd2: b = p[7:0];
        3'd3: b = p[15:8];
        3'd4: b = s[7:0];
        default: b = s[15:8];
      endcase
      OP_SAMPLE_S:    b = (k == 3'd0) ? s[7:0] : s[15:8];
      OP_SAMPLE_DIAG: b = {o, p[15], p[10], p[5], p[0]};
      default:        b = '0;
    endcase
    return b;
  endfunction

  // next value of the P diagonal element of computer i
  function automatic logic diag_next(input logic [15:0] p, input logic nogo, input int i);
    logic [3:0] g, says_good;
    int         n_good, n_yes, n_no;
    for (int j = 0; j < 4; j++) begin
      g[j]         = p[5*j];
      says_good[j] = p[4*j + i];
    end
    n_good = 0; n_yes = 0; n_no = 0;
    for (int j = 0; j < 4; j++) if (j != i && g[j]) begin
      n_good++;
      if (says_good[j]) n_yes++; else n_no++;
    end
    if (nogo || n_no >= 2)           return 1'b0;
    else if (n_yes >= 2 || n_good == 0) return 1'b1;
    else                             return p[5*i];
  endfunction

  always_ff @(posedge clk) begin
    if (pwron) begin
      state      <= M_SCAN;
      mic        <= '0;
      opc        <= OP_SET_RP;
      idx        <= '0;
      last       <= '0;
      insrv      <= '0;
      newmod     <= 1'b0;
      oreq       <= 1'b0;
      mbr        <= '0;
      dest       <= '0;
      rp_written <= 1'b0;
      p_mat      <= '1;
      r_mat      <= '0;
      s_mat      <= '0;
      om         <= '0;
    end else if (bit_en) begin
      insrv      <= '0;
      newmod     <= 1'b0;
      rp_written <= 1'b0;
      om         <= used;
      for (int i = 0; i < 4; i++) p_mat[5*i] <= diag_next(p_mat, comp_nogo[i], i);
      if (stat_valid && state == M_SCAN)
        for (int rw = 0; rw < 4; rw++) s_mat[4*rw +: 4] <= s_mat[4*rw +: 4] | disagree;

      unique case (state)
        M_SCAN: begin
          dest <= '0;
          if (mi[mic]) begin
            opc        <= opcode_e'(brb[mic][2:0]);
            insrv[mic] <= 1'b1;
            state      <= M_DISPATCH;
          end else mic <= mic + 1'b1;
        end

        M_DISPATCH: begin
          idx <= '0;
          unique case (opc)
            OP_SET_ALL, OP_SET_RP: state <= M_SET_WAIT;
            OP_CLR_S: begin
              s_mat[4*mic +: 4] <= '0;
              state             <= M_SCAN;
            end
            OP_SAMPLE_ALL, OP_SAMPLE_DIAG, OP_SAMPLE_S: begin
              last  <= (opc == OP_SAMPLE_ALL) ? 3'd5 : (opc == OP_SAMPLE_S) ? 3'd1 : 3'd0;
              mbr   <= sample_byte(opc, 3'd0, p_mat, r_mat, s_mat, om);
              oreq  <= 1'b1;
              dest  <= 4'(1 << mic);
              state <= M_SAMPLE;
            end
            default: state <= M_SCAN;   // undefined code: ignored
          endcase
        end

        M_SET_WAIT: if (mi[mic]) begin
          mbr        <= brb[mic];
          insrv[mic] <= 1'b1;
          state      <= M_SET_APPLY;
        end

        M_SET_APPLY: begin
          r_mat[4*mic +: 4] <= mbr[7:4];
          for (int c = 0; c < 4; c++)
            if (c != int'(mic)) p_mat[4*mic + c] <= mbr[c];
          if (opc == OP_SET_ALL) s_mat[4*mic +: 4] <= '0;
          newmod     <= 1'b1;
          rp_written <= 1'b1;
          state      <= M_SCAN;
        end

        M_SAMPLE: begin
          if (lp_abort) begin
            oreq  <= 1'b0;
            state <= M_SCAN;
          end else if (or_in) begin
            if (idx == last) begin
              oreq  <= 1'b0;
              state <= M_SCAN;
            end else begin
              idx <= idx + 1'b1;
              mbr <= sample_byte(opc, idx + 1'b1, p_mat, r_mat, s_mat, om);
            end
          end
        end

        default: state <= M_SCAN;
      endcase
    end
  end

endmodule
