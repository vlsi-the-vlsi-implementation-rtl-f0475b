// ext_mem_model: behavioural model of the external memory (not synthesizable
// intent; testbench use only).
//
// Answers each request of the hold-until-ack handshake after LAT clocks with
// a one-cycle ack; read data is presented with the ack, writes take effect
// with it. Storage is sparse (associative array, unwritten words read as
// zero) so the full 2^19-word address space costs nothing. poke/peek give
// the testbench direct access; reads and writes are counted.
module ext_mem_model
  import upc_pkg::*;
#(
  parameter int unsigned LAT = 2
) (
  input  logic              clk,
  input  logic              req,
  input  logic              we,
  input  logic [ADDR_W-1:0] addr,
  input  logic [MEM_W-1:0]  wdata,
  output logic              ack,
  output logic [MEM_W-1:0]  rdata
);

  logic [MEM_W-1:0] store [logic [ADDR_W-1:0]];
  int unsigned      cnt;
  int               state = 0;
  int               n_rd = 0, n_wr = 0;

  initial begin
    ack   = 1'b0;
    rdata = '0;
  end

  function automatic logic [MEM_W-1:0] peek(logic [ADDR_W-1:0] a);
    return store.exists(a) ? store[a] : '0;
  endfunction

  function automatic void poke(logic [ADDR_W-1:0] a, logic [MEM_W-1:0] d);
    store[a] = d;
  endfunction

  always @(posedge clk) begin
    case (state)
      0: if (req) begin cnt <= LAT; state <= 1; end
      1: if (cnt <= 1) begin
           ack <= 1'b1;
           if (we) begin store[addr] = wdata; n_wr++; end
           else    begin rdata <= peek(addr); n_rd++; end
           state <= 2;
         end else cnt <= cnt - 1;
      default: begin ack <= 1'b0; state <= 0; end
    endcase
  end

endmodule
