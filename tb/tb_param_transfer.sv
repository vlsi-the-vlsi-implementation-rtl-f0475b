// tb_param_transfer: register writes and read-back, the mask word given to
// the header extraction, status bits set by event pulses and cleared only by
// writing ones, an event that coincides with a clear, the interrupt under
// its enables, and indirect writes and reads of the external memory through
// mem_ctrl and the memory model.
module tb_param_transfer;
  import upc_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic              sel = 0, we = 0, irq, table_mode;
  logic [CPU_AW-1:0] addr = 0;
  logic [31:0]       wdata = 0, rdata;
  logic [15:0]       ev = 0;
  logic [HDR_W-1:0]  mask;
  logic [1:0]        c_req, c_we, c_done;
  logic [ADDR_W-1:0] c_addr  [2];
  logic [MEM_W-1:0]  c_wdata [2];
  logic [MEM_W-1:0]  c_rdata;
  logic              ereq, ewe, eack;
  logic [ADDR_W-1:0] eaddr;
  logic [MEM_W-1:0]  ewdata, erdata;
  int checks = 0, failures = 0;

  param_transfer dut (.clk(clk), .rst_n(rst_n), .cpu_sel(sel), .cpu_we(we), .cpu_addr(addr),
                      .cpu_wdata(wdata), .cpu_rdata(rdata), .irq(irq), .ev(ev),
                      .table_mode(table_mode), .mask(mask),
                      .m_req(c_req[1]), .m_we(c_we[1]), .m_addr(c_addr[1]), .m_wdata(c_wdata[1]),
                      .m_done(c_done[1]), .m_rdata(c_rdata));
  assign c_req[0] = 1'b0; assign c_we[0] = 1'b0;
  assign c_addr[0] = '0;  assign c_wdata[0] = '0;
  mem_ctrl u_mc (.clk(clk), .rst_n(rst_n), .cli_req(c_req), .cli_we(c_we), .cli_addr(c_addr),
                 .cli_wdata(c_wdata), .cli_done(c_done), .rdata(c_rdata),
                 .ext_req(ereq), .ext_we(ewe), .ext_addr(eaddr), .ext_wdata(ewdata),
                 .ext_ack(eack), .ext_rdata(erdata));
  ext_mem_model #(.LAT(2)) mem (.clk(clk), .req(ereq), .we(ewe), .addr(eaddr),
                                .wdata(ewdata), .ack(eack), .rdata(erdata));

  task automatic wr(int a, logic [31:0] d);
    @(negedge clk); sel = 1; we = 1; addr = CPU_AW'(a); wdata = d;
    @(negedge clk); sel = 0; we = 0;
  endtask

  task automatic rd(int a, output logic [31:0] d);
    @(negedge clk); sel = 1; we = 0; addr = CPU_AW'(a); #1 d = rdata;
    @(negedge clk); sel = 0;
  endtask

  task automatic expect_reg(int a, logic [31:0] x, string what);
    logic [31:0] d;
    rd(a, d);
    checks++;
    if (d !== x) begin failures++; $display("FAIL %s: reg %0d = %h exp %h", what, a, d, x); end
  endtask

  task automatic pulse(logic [15:0] e);
    @(negedge clk); ev = e; @(negedge clk); ev = 0;
  endtask

  task automatic wait_idle();
    logic [31:0] d;
    do rd(9, d); while (d[0]);
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [MEM_W-1:0] w;
    logic [31:0] d;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // mode and masks
    wr(0, 1);
    checks++; if (table_mode !== 1'b1) begin failures++; $display("FAIL table_mode"); end
    expect_reg(0, 1, "ctrl");
    wr(1, 32'h0F); wr(2, 32'hFF); wr(3, 32'hF0); wr(4, 32'h0E);
    checks++; if (mask !== 32'h0FFF_F00E) begin failures++; $display("FAIL mask %h", mask); end
    expect_reg(3, 32'hF0, "mask2");
    // status: set, sticky, write one to clear
    wr(7, 16'h0104);
    pulse(16'h0105);
    expect_reg(5, 32'h05, "status0");
    expect_reg(6, 32'h01, "status1");
    checks++; if (irq !== 1'b1) begin failures++; $display("FAIL irq not raised"); end
    wr(5, 32'h01);
    expect_reg(5, 32'h04, "status0 after clearing bit 0");
    wr(5, 32'h04); wr(6, 32'h01);
    checks++; if (irq !== 1'b0) begin failures++; $display("FAIL irq not cleared"); end
    pulse(16'h0002);
    checks++; if (irq !== 1'b0) begin failures++; $display("FAIL irq from masked bit"); end
    // event in the same cycle as its clear: stays set
    @(negedge clk); sel = 1; we = 1; addr = 5; wdata = 32'h02; ev = 16'h0002;
    @(negedge clk); sel = 0; we = 0; ev = 0;
    expect_reg(5, 32'h02, "set wins over clear");
    // indirect memory write and read
    w = {$urandom, $urandom, $urandom, $urandom, $urandom};
    wr(8, 32'h5_1234);
    for (int i = 0; i < 5; i++) wr(10 + i, w[32*i +: 32]);
    wr(9, 1);
    wait_idle();
    checks++; if (mem.peek(19'h5_1234) !== w) begin failures++; $display("FAIL memory write"); end
    mem.poke(19'h0_0042, ~w);
    wr(8, 32'h42);
    wr(9, 2);
    wait_idle();
    for (int i = 0; i < 5; i++) expect_reg(10 + i, (i == 4) ? 32'((~w) >> 128) : (~w) >> (32 * i), "memory read");
    expect_reg(8, 32'h42, "mem addr");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
