// upc_top: four-link ATM usage parameter control (UPC) device.
//
// Each link delivers 53-byte cells on its own byte clock into a four-cell
// FIFO (input_port). Cell flow control picks a waiting cell round robin and
// sends its header to the policing path: header_extract packs the header
// bits chosen by the mask registers into a connection index, and vsa_unit
// reads that connection's record from external memory (through a lookup
// table first in table lookup mode), runs the Virtual Scheduling Algorithm
// and writes the record back. The decision (pass, tag = set CLP, discard)
// goes to the link's clp_tag_discard stage, which streams the cell out on
// the device clock. A microprocessor programs modes, masks and connection
// records and reads the input status through param_transfer; mem_ctrl
// shares the one external memory between the VSA unit and the processor.
//
// Interfaces: clk is the 50 MHz device clock, rst_n an asynchronous
// active-low reset for all domains; rx_* are the link inputs (rx_clk[i] is
// link i's byte clock), tx_* the link outputs on clk; cpu_* the register
// port; ext_* the external memory handshake (hold request until ack).
// The block structure is the document's; see the modules for the details.
module upc_top
  import upc_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  // links in
  input  logic [NUM_LINKS-1:0]  rx_clk,
  input  logic [NUM_LINKS-1:0]  rx_valid,
  input  logic [NUM_LINKS-1:0]  rx_soc,
  input  logic [7:0]            rx_data [NUM_LINKS],
  // links out
  output logic [NUM_LINKS-1:0]  tx_valid,
  output logic [NUM_LINKS-1:0]  tx_soc,
  output logic [7:0]            tx_data [NUM_LINKS],
  // microprocessor
  input  logic                  cpu_sel,
  input  logic                  cpu_we,
  input  logic [CPU_AW-1:0]     cpu_addr,
  input  logic [31:0]           cpu_wdata,
  output logic [31:0]           cpu_rdata,
  output logic                  irq,
  // external memory
  output logic                  ext_req,
  output logic                  ext_we,
  output logic [ADDR_W-1:0]     ext_addr,
  output logic [MEM_W-1:0]      ext_wdata,
  input  logic                  ext_ack,
  input  logic [MEM_W-1:0]      ext_rdata
);

  // input ports <-> flow control / output stages
  logic [NUM_LINKS-1:0]             cell_avail, pop, out_busy, start;
  logic [HDR_W-1:0]                 hdr    [NUM_LINKS];
  logic [5:0]                       rd_idx [NUM_LINKS];
  logic [7:0]                       rd_data[NUM_LINKS];
  logic [NUM_LINKS*EV_PER_LINK-1:0] ev;
  decision_e                        start_dec;

  // policing path
  logic              v_req, v_clp, v_busy, v_done;
  logic [LINK_W-1:0] v_link;
  logic [HDR_W-1:0]  v_hdr, mask;
  logic [EXT_W-1:0]  v_idx;
  decision_e         v_dec;
  logic              table_mode;
  logic [TIME_W-1:0] now;

  // memory clients: 0 = VSA unit, 1 = parameter transfer
  logic [1:0]        c_req, c_we, c_done;
  logic [ADDR_W-1:0] c_addr  [2];
  logic [MEM_W-1:0]  c_wdata [2];
  logic [MEM_W-1:0]  c_rdata;

  for (genvar i = 0; i < NUM_LINKS; i++) begin : g_link
    input_port u_in (
      .rst_n      (rst_n),
      .rx_clk     (rx_clk[i]),
      .rx_valid   (rx_valid[i]),
      .rx_soc     (rx_soc[i]),
      .rx_data    (rx_data[i]),
      .clk        (clk),
      .cell_avail (cell_avail[i]),
      .hdr        (hdr[i]),
      .rd_idx     (rd_idx[i]),
      .rd_data    (rd_data[i]),
      .pop        (pop[i]),
      .ev         (ev[i*EV_PER_LINK +: EV_PER_LINK])
    );

    clp_tag_discard u_out (
      .clk      (clk),
      .rst_n    (rst_n),
      .start    (start[i]),
      .dec      (start_dec),
      .busy     (out_busy[i]),
      .rd_idx   (rd_idx[i]),
      .rd_data  (rd_data[i]),
      .pop      (pop[i]),
      .tx_valid (tx_valid[i]),
      .tx_soc   (tx_soc[i]),
      .tx_data  (tx_data[i])
    );
  end

  cell_flow_control u_flow (
    .clk        (clk),
    .rst_n      (rst_n),
    .cell_avail (cell_avail),
    .hdr        (hdr),
    .out_busy   (out_busy),
    .start      (start),
    .start_dec  (start_dec),
    .v_req      (v_req),
    .v_link     (v_link),
    .v_hdr      (v_hdr),
    .v_clp      (v_clp),
    .v_done     (v_done),
    .v_dec      (v_dec)
  );

  header_extract u_hx (
    .hdr  (v_hdr),
    .mask (mask),
    .idx  (v_idx)
  );

  vsa_unit u_vsa (
    .clk        (clk),
    .rst_n      (rst_n),
    .table_mode (table_mode),
    .req        (v_req),
    .link       (v_link),
    .idx        (v_idx),
    .clp        (v_clp),
    .busy       (v_busy),
    .done       (v_done),
    .dec        (v_dec),
    .m_req      (c_req[0]),
    .m_we       (c_we[0]),
    .m_addr     (c_addr[0]),
    .m_wdata    (c_wdata[0]),
    .m_done     (c_done[0]),
    .m_rdata    (c_rdata),
    .now        (now)
  );

  param_transfer u_par (
    .clk        (clk),
    .rst_n      (rst_n),
    .cpu_sel    (cpu_sel),
    .cpu_we     (cpu_we),
    .cpu_addr   (cpu_addr),
    .cpu_wdata  (cpu_wdata),
    .cpu_rdata  (cpu_rdata),
    .irq        (irq),
    .ev         (ev),
    .table_mode (table_mode),
    .mask       (mask),
    .m_req      (c_req[1]),
    .m_we       (c_we[1]),
    .m_addr     (c_addr[1]),
    .m_wdata    (c_wdata[1]),
    .m_done     (c_done[1]),
    .m_rdata    (c_rdata)
  );

  mem_ctrl u_mem (
    .clk        (clk),
    .rst_n      (rst_n),
    .cli_req    (c_req),
    .cli_we     (c_we),
    .cli_addr   (c_addr),
    .cli_wdata  (c_wdata),
    .cli_done   (c_done),
    .rdata      (c_rdata),
    .ext_req    (ext_req),
    .ext_we     (ext_we),
    .ext_addr   (ext_addr),
    .ext_wdata  (ext_wdata),
    .ext_ack    (ext_ack),
    .ext_rdata  (ext_rdata)
  );

  // the VSA unit only gets a request while it is idle
  a_vsa_idle: assert property (@(posedge clk) disable iff (!rst_n) v_req |-> !v_busy);

endmodule
