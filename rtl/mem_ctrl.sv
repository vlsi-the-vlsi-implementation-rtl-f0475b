// mem_ctrl: shares the single external memory between the device's clients.
//
// The VSA unit and the parameter transfer (microprocessor) port both reach
// the external memory through this controller. A client raises req with
// we/addr/wdata and holds them until it sees a one-cycle done pulse; for a
// read, rdata is valid in that cycle and stays valid until the next access
// completes. Competing requests are granted round robin, one access at a
// time. On the memory side the controller holds ext_req, ext_we, ext_addr
// and ext_wdata stable until the memory answers with ext_ack; read data is
// taken from ext_rdata in the ack cycle. From req to done an access that
// meets no competitor takes the memory's response time (clocks from ext_req
// to ext_ack) plus three clocks.
//
// The document names the memory controller and says that one external
// dynamic memory, sized to the number of connections, holds the parameters
// and the lookup table, clocked with the 50 MHz device clock. The request/ack
// handshake and the arbitration are this design's choices; refresh and
// DRAM timing are left to the memory side of the handshake.
module mem_ctrl
  import upc_pkg::*;
#(
  parameter int unsigned NCLI = 2,        // number of clients
  parameter int unsigned AW   = ADDR_W,   // address width
  parameter int unsigned DW   = MEM_W     // data width
) (
  input  logic                clk,
  input  logic                rst_n,
  // clients
  input  logic [NCLI-1:0]     cli_req,
  input  logic [NCLI-1:0]     cli_we,
  input  logic [AW-1:0]       cli_addr  [NCLI],
  input  logic [DW-1:0]       cli_wdata [NCLI],
  output logic [NCLI-1:0]     cli_done,
  output logic [DW-1:0]       rdata,
  // external memory
  output logic                ext_req,
  output logic                ext_we,
  output logic [AW-1:0]       ext_addr,
  output logic [DW-1:0]       ext_wdata,
  input  logic                ext_ack,
  input  logic [DW-1:0]       ext_rdata
);

  localparam int unsigned CW = (NCLI > 1) ? $clog2(NCLI) : 1;

  typedef enum logic [1:0] {S_IDLE, S_BUSY, S_DONE} state_e;
  state_e        state;
  logic [CW-1:0] owner, last;
  logic          found;
  logic [CW-1:0] pick;

  // round robin: first requesting client after the last one granted
  always_comb begin
    found = 1'b0;
    pick  = '0;
    for (int unsigned k = 1; k <= NCLI; k++) begin
      int unsigned c;
      c = (int'(last) + k) % NCLI;
      if (!found && cli_req[c]) begin
        found = 1'b1;
        pick  = CW'(c);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      owner     <= '0;
      last      <= CW'(NCLI - 1);
      cli_done  <= '0;
      rdata     <= '0;
      ext_req   <= 1'b0;
      ext_we    <= 1'b0;
      ext_addr  <= '0;
      ext_wdata <= '0;
    end else begin
      cli_done <= '0;
      unique case (state)
        S_IDLE: if (found) begin
          owner     <= pick;
          last      <= pick;
          ext_req   <= 1'b1;
          ext_we    <= cli_we[pick];
          ext_addr  <= cli_addr[pick];
          ext_wdata <= cli_wdata[pick];
          state     <= S_BUSY;
        end
        S_BUSY: if (ext_ack) begin
          ext_req         <= 1'b0;
          if (!ext_we) rdata <= ext_rdata;
          cli_done[owner] <= 1'b1;
          state           <= S_DONE;
        end
        S_DONE: state <= S_IDLE;   // the client drops req in this cycle
        default: state <= S_IDLE;
      endcase
    end
  end

  // a client keeps its request up until it is served
  for (genvar g = 0; g < NCLI; g++) begin : g_chk
    a_hold: assert property (@(posedge clk) disable iff (!rst_n)
                             (state == S_BUSY && owner == CW'(g)) |-> cli_req[g]);
  end

endmodule
