// cell_flow_control: moves cells from the link FIFOs through the policing path.
//
// A link is eligible when its input FIFO holds a complete cell and its output
// stage is idle. The eligible links are served round robin: the head cell's
// header and link number go to the VSA unit (v_req, one-cycle pulse); when
// the VSA unit reports its decision (v_done), the link's output stage is
// started (start, one-cycle pulse) with that decision and streams or drops
// the cell on its own, so the four links stream in parallel while the
// policing path handles one cell at a time. The CLP bit sent with the
// request is bit 0 of header byte 3.
//
// The document shows this block between the input FIFOs, the header
// extraction, the VSA and the CLP-bit-or-discard stage but does not describe
// it further; the round-robin order and the one-cell-at-a-time policing are
// this design's choices.
module cell_flow_control
  import upc_pkg::*;
#(
  parameter int unsigned N = NUM_LINKS
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // input FIFOs
  input  logic [N-1:0]          cell_avail,
  input  logic [HDR_W-1:0]      hdr [N],
  // output stages
  input  logic [N-1:0]          out_busy,
  output logic [N-1:0]          start,
  output decision_e             start_dec,
  // VSA unit
  output logic                  v_req,
  output logic [LINK_W-1:0]     v_link,
  output logic [HDR_W-1:0]      v_hdr,
  output logic                  v_clp,
  input  logic                  v_done,
  input  decision_e             v_dec
);

  typedef enum logic {S_IDLE, S_WAIT} state_e;
  state_e            state;
  logic [LINK_W-1:0] last, pick;
  logic              found;
  logic [N-1:0]      elig;

  assign elig = cell_avail & ~out_busy;

  always_comb begin
    found = 1'b0;
    pick  = '0;
    for (int unsigned k = 1; k <= N; k++) begin
      int unsigned c;
      c = (int'(last) + k) % N;
      if (!found && elig[c]) begin
        found = 1'b1;
        pick  = LINK_W'(c);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      last      <= LINK_W'(N - 1);
      start     <= '0;
      start_dec <= DEC_PASS;
      v_req     <= 1'b0;
      v_link    <= '0;
      v_hdr     <= '0;
      v_clp     <= 1'b0;
    end else begin
      start <= '0;
      v_req <= 1'b0;
      unique case (state)
        S_IDLE: if (found) begin
          last   <= pick;
          v_req  <= 1'b1;
          v_link <= pick;
          v_hdr  <= hdr[pick];
          v_clp  <= hdr[pick][0];
          state  <= S_WAIT;
        end
        S_WAIT: if (v_done) begin
          start[v_link] <= 1'b1;
          start_dec     <= v_dec;
          state         <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
