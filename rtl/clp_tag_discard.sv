// clp_tag_discard: output stage of one link: pass, tag or discard a cell.
//
// A start pulse with a decision takes the head cell of the link's input
// FIFO. A passed cell is streamed out unchanged, one byte per clock, with
// tx_soc on its first byte; a tagged cell is streamed with the CLP bit
// (bit 0 of header byte 3) set to 1; a discarded cell is released from the
// FIFO in one clock and never appears on the output. Bytes leave one clock
// after they are read (registered outputs), and the FIFO slot is released
// (pop) with the last byte. busy covers the start cycle, so the flow control
// never starts a busy stage twice.
//
// The three outcomes follow the document; the byte-wide output, its timing
// and leaving the HEC byte unchanged are this design's choices.
module clp_tag_discard
  import upc_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  decision_e  dec,
  output logic       busy,
  // input FIFO read port
  output logic [5:0] rd_idx,
  input  logic [7:0] rd_data,
  output logic       pop,
  // cell output
  output logic       tx_valid,
  output logic       tx_soc,
  output logic [7:0] tx_data
);

  logic      act;
  decision_e mode;

  assign busy   = act || start;
  assign pop    = act && (mode == DEC_DISCARD || rd_idx == 6'(CELL_BYTES - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      act      <= 1'b0;
      mode     <= DEC_PASS;
      rd_idx   <= '0;
      tx_valid <= 1'b0;
      tx_soc   <= 1'b0;
      tx_data  <= '0;
    end else begin
      tx_valid <= 1'b0;
      tx_soc   <= 1'b0;
      if (!act) begin
        if (start) begin
          act    <= 1'b1;
          mode   <= dec;
          rd_idx <= '0;
        end
      end else begin
        if (mode != DEC_DISCARD) begin
          tx_valid <= 1'b1;
          tx_soc   <= (rd_idx == '0);
          tx_data  <= (mode == DEC_TAG && rd_idx == 6'd3) ? (rd_data | 8'h01) : rd_data;
          rd_idx   <= rd_idx + 6'd1;
        end
        if (pop) act <= 1'b0;
      end
    end
  end

endmodule
