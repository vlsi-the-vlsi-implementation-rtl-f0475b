// param_transfer: microprocessor interface of the UPC device.
//
// A simple synchronous register port (cpu_sel, cpu_we, word index cpu_addr,
// 32-bit data; writes take effect at the clock edge, reads are combinational)
// gives access to:
//   0  CTRL      bit 0: 1 = table lookup mode, 0 = direct mode
//   1-4 MASK0-3  8-bit header mask registers for header bytes 0..3
//   5  STATUS0   input status of links 0 (bits 3:0) and 1 (bits 7:4)
//   6  STATUS1   input status of links 2 and 3
//                per link: early sync, late sync, FIFO overflow, missing clock
//   7  IRQ_EN    interrupt enables, bit i for bit i of {STATUS1, STATUS0}
//   8  MEM_ADDR  external memory word address
//   9  MEM_CMD   write 1: store MEM_DATA at MEM_ADDR, write 2: load it;
//                read: bit 0 = access in progress
//   10-14 MEM_DATA0-4  memory word, MEM_DATA0 holding bits 31:0
// Status bits are set by one-cycle event pulses and stay set until the
// processor writes a one to them; an event in the same cycle as the clear
// wins. irq is high while any enabled status bit is set. Memory accesses
// use a mem_ctrl client port, which is how connection parameters (TAT, T,
// tau, E, counter) and lookup table entries are transferred.
//
// The mask registers, the two status registers, write-one-to-clear and the
// interrupt follow the document; the register map and the indirect memory
// window are this design's choices.
module param_transfer
  import upc_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  // microprocessor port
  input  logic                cpu_sel,
  input  logic                cpu_we,
  input  logic [CPU_AW-1:0]   cpu_addr,
  input  logic [31:0]         cpu_wdata,
  output logic [31:0]         cpu_rdata,
  output logic                irq,
  // input status events, EV_PER_LINK bits per link
  input  logic [NUM_LINKS*EV_PER_LINK-1:0] ev,
  // configuration
  output logic                table_mode,
  output logic [HDR_W-1:0]    mask,
  // memory client port
  output logic                m_req,
  output logic                m_we,
  output logic [ADDR_W-1:0]   m_addr,
  output logic [MEM_W-1:0]    m_wdata,
  input  logic                m_done,
  input  logic [MEM_W-1:0]    m_rdata
);

  localparam int unsigned NDW = (MEM_W + 31) / 32;   // data words in the window
  localparam int unsigned SW  = NUM_LINKS * EV_PER_LINK;

  localparam logic [CPU_AW-1:0] A_CTRL   = 4'd0;
  localparam logic [CPU_AW-1:0] A_MASK0  = 4'd1;
  localparam logic [CPU_AW-1:0] A_STAT0  = 4'd5;
  localparam logic [CPU_AW-1:0] A_STAT1  = 4'd6;
  localparam logic [CPU_AW-1:0] A_IRQEN  = 4'd7;
  localparam logic [CPU_AW-1:0] A_MADDR  = 4'd8;
  localparam logic [CPU_AW-1:0] A_MCMD   = 4'd9;
  localparam logic [CPU_AW-1:0] A_MDATA0 = 4'd10;

  logic [7:0]          mask_r [HDR_BYTES];
  logic [SW-1:0]       status, irq_en;
  logic [NDW*32-1:0]   mdata;
  logic                wr;
  logic [SW-1:0]       clr;

  logic [CPU_AW-1:0]   moff, doff;   // offsets into the mask and data windows

  assign wr   = cpu_sel && cpu_we;
  assign moff = cpu_addr - A_MASK0;
  assign doff = cpu_addr - A_MDATA0;

  always_comb begin
    clr = '0;
    if (wr && cpu_addr == A_STAT0) clr[7:0]  = cpu_wdata[7:0];
    if (wr && cpu_addr == A_STAT1) clr[15:8] = cpu_wdata[7:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      table_mode <= 1'b0;
      for (int i = 0; i < int'(HDR_BYTES); i++) mask_r[i] <= '0;
      status <= '0;
      irq_en <= '0;
      mdata  <= '0;
      m_req  <= 1'b0;
      m_we   <= 1'b0;
      m_addr <= '0;
    end else begin
      status <= (status & ~clr) | ev;
      if (wr) begin
        if (cpu_addr == A_CTRL)  table_mode <= cpu_wdata[0];
        if (cpu_addr >= A_MASK0 && cpu_addr < A_MASK0 + CPU_AW'(HDR_BYTES))
          mask_r[moff[1:0]] <= cpu_wdata[7:0];
        if (cpu_addr == A_IRQEN) irq_en <= cpu_wdata[SW-1:0];
        if (cpu_addr == A_MADDR) m_addr <= cpu_wdata[ADDR_W-1:0];
        if (cpu_addr >= A_MDATA0 && cpu_addr < A_MDATA0 + CPU_AW'(NDW))
          mdata[32*int'(doff) +: 32] <= cpu_wdata;
        if (cpu_addr == A_MCMD && !m_req) begin
          if (cpu_wdata[1:0] == 2'd1) begin m_req <= 1'b1; m_we <= 1'b1; end
          if (cpu_wdata[1:0] == 2'd2) begin m_req <= 1'b1; m_we <= 1'b0; end
        end
      end
      if (m_req && m_done) begin
        m_req <= 1'b0;
        if (!m_we) mdata[MEM_W-1:0] <= m_rdata;
      end
    end
  end

  assign m_wdata = mdata[MEM_W-1:0];
  assign mask    = {mask_r[0], mask_r[1], mask_r[2], mask_r[3]};
  assign irq     = |(status & irq_en);

  always_comb begin
    cpu_rdata = '0;
    unique case (cpu_addr)
      A_CTRL:  cpu_rdata[0]      = table_mode;
      A_STAT0: cpu_rdata[7:0]    = status[7:0];
      A_STAT1: cpu_rdata[7:0]    = status[15:8];
      A_IRQEN: cpu_rdata[SW-1:0] = irq_en;
      A_MADDR: cpu_rdata[ADDR_W-1:0] = m_addr;
      A_MCMD:  cpu_rdata[0]      = m_req;
      default: begin
        if (cpu_addr >= A_MASK0 && cpu_addr < A_MASK0 + CPU_AW'(HDR_BYTES))
          cpu_rdata[7:0] = mask_r[moff[1:0]];
        if (cpu_addr >= A_MDATA0 && cpu_addr < A_MDATA0 + CPU_AW'(NDW))
          cpu_rdata = mdata[32*int'(doff) +: 32];
      end
    endcase
  end

endmodule
