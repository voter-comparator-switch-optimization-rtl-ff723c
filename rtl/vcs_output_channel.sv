// vcs_output_channel: path from the VCS to the computers.
//
// Two sources share one byte-parallel bus (data, odd parity) to all
// computers:
//   LP data: any word on the serial LP data bus (lp_rx_valid/lp_rx_data, one
//     bit per bit time: 16 data bits MSB first, then the word's odd parity
//     bit) is collected in the serial-to-parallel converter (SPC). After 8
//     bits the byte goes to the output buffer register (OBR) with freshly
//     generated odd parity and data_strobe is raised for two bit times. The
//     second byte is released when the 17th bit arrives; its parity copies
//     the first byte's parity when the LP parity bit is 1 and inverts it when
//     it is 0, so that a parity error on the bus reaches the computers
//     unchanged. If the bus goes quiet right after 16 bits, the second byte
//     is sent with generated parity. LP data has absolute priority: bus
//     activity ends a matrix transfer and is signalled on lp_abort.
//   Matrix data: when the bus is quiet and the matrix section raises oreq,
//     MBR is copied to OBR, parity generated, the matrix strobe of the
//     requesting computer (dest) raised for two bit times and output ready
//     (or_out) pulsed for one bit time; oreq is tested again one bit time
//     after the strobe falls.
// Like every output it is held false while pwron is applied; power_reset is
// raised in the first bit time after power-on and held until a computer has
// rewritten its P and R rows (rp_written). Registers advance when bit_en is high.
// The data formats, parity rule, priorities and strobe lengths follow the
// specification; the bus framing signals and the power-reset clearing rule
// are this design's.
module vcs_output_channel
  import vcs_pkg::*;
(
  input  logic       clk,
  input  logic       bit_en,
  input  logic       pwron,
  // LP data bus receiver
  input  logic       lp_rx_valid,
  input  logic       lp_rx_data,
  // matrix section
  input  logic       oreq,
  input  logic [7:0] mbr,
  input  logic [3:0] dest,
  output logic       or_out,
  output logic       lp_abort,
  input  logic       rp_written,
  // computer bus
  output logic [7:0] data_out,
  output logic       parity_out,
  output logic       data_strobe,
  output logic [3:0] matrix_strobe,
  output logic       power_reset
);

  typedef enum logic [2:0] {O_IDLE, O_MS1, O_MS2, O_GAP, O_LP} ostate_e;

  ostate_e    state;
  logic [7:0] spc;
  logic [4:0] cnt;        // bits received in the current word
  logic       p1;         // parity sent with the first byte of the word
  logic       pr_arm;     // power-on seen, power_reset still to be raised
  logic [1:0] ds_cnt;

  wire [7:0] spc_next = {spc[6:0], lp_rx_data};

  always_ff @(posedge clk) begin
    if (pwron) begin
      state         <= O_IDLE;
      spc           <= '0;
      cnt           <= '0;
      p1            <= 1'b0;
      ds_cnt        <= '0;
      or_out        <= 1'b0;
      lp_abort      <= 1'b0;
      data_out      <= '0;
      parity_out    <= 1'b0;
      data_strobe   <= 1'b0;
      matrix_strobe <= '0;
      power_reset   <= 1'b0;
      pr_arm        <= 1'b1;
    end else if (bit_en) begin
      pr_arm   <= 1'b0;
      if (pr_arm) power_reset <= 1'b1;
      or_out   <= 1'b0;
      lp_abort <= 1'b0;
      if (rp_written) power_reset <= 1'b0;
      if (ds_cnt != 0) ds_cnt <= ds_cnt - 1'b1;
      else             data_strobe <= 1'b0;

      if (lp_rx_valid && state != O_LP) begin
        // LP data takes the bus, ending any matrix transfer
        if (state != O_IDLE) lp_abort <= 1'b1;
        matrix_strobe <= '0;
        spc           <= spc_next;
        cnt           <= 5'd1;
        state         <= O_LP;
      end else begin
        unique case (state)
          O_IDLE: if (oreq) begin
            data_out      <= mbr;
            parity_out    <= odd_parity(mbr);
            matrix_strobe <= dest;
            or_out        <= 1'b1;
            state         <= O_MS1;
          end
          O_MS1: state <= O_MS2;
          O_MS2: begin
            matrix_strobe <= '0;
            state         <= O_GAP;
          end
          O_GAP: state <= O_IDLE;
          O_LP: begin
            if (lp_rx_valid) begin
              if (cnt == 5'(WORD_BITS)) begin
                // 17th bit: LP parity for the word
                data_out    <= spc;
                parity_out  <= lp_rx_data ? p1 : ~p1;
                data_strobe <= 1'b1;
                ds_cnt      <= 2'(STROBE_TIME - 1);
                cnt         <= '0;
              end else begin
                spc <= spc_next;
                cnt <= cnt + 1'b1;
                if (cnt == 5'(BYTE_BITS - 1)) begin
                  data_out    <= spc_next;
                  parity_out  <= odd_parity(spc_next);
                  p1          <= odd_parity(spc_next);
                  data_strobe <= 1'b1;
                  ds_cnt      <= 2'(STROBE_TIME - 1);
                end
              end
            end else begin
              if (cnt == 5'(WORD_BITS)) begin
                data_out    <= spc;
                parity_out  <= odd_parity(spc);
                data_strobe <= 1'b1;
                ds_cnt      <= 2'(STROBE_TIME - 1);
              end
              cnt   <= '0;
              state <= O_IDLE;
            end
          end
          default: state <= O_IDLE;
        endcase
      end
    end
  end

endmodule
