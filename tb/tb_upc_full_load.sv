// tb_upc_full_load: the rated load of the device. All four links run at
// 155.52 Mb/s (byte clock 19.44 MHz, 51.44 ns) and send cells back to back
// with no gap, 100 % load, first in direct mode and then in table lookup
// mode, against a memory that answers in 3 clocks. The device must keep up:
// no FIFO overflow on any link, every cell policed, every passed or tagged
// cell forwarded, one late sync per link per burst (after its last cell)
// and no early sync. The time from a policing request to its decision is
// measured and must stay within the budget of one cell time of the four
// links together, 424 bit / (4 x 155.52 Mb/s) = 34 device clocks.
module tb_upc_full_load;
  import upc_pkg::*;

  localparam int unsigned N_DIRECT = 120;   // cells per link, direct mode
  localparam int unsigned N_TABLE  = 80;    // cells per link, table mode
  localparam int unsigned BUDGET   = 34;    // device clocks per decision

  logic clk = 0, rst_n = 0;
  always #10 clk = ~clk;

  logic [3:0] rx_clk = 0, rx_valid = 0, rx_soc = 0;
  logic [7:0] rx_data [4];
  logic [3:0] tx_valid, tx_soc;
  logic [7:0] tx_data [4];
  logic              sel = 0, we = 0, irq;
  logic [CPU_AW-1:0] addr = 0;
  logic [31:0]       wdata = 0, rdata;
  logic              ereq, ewe, eack;
  logic [ADDR_W-1:0] eaddr;
  logic [MEM_W-1:0]  ewdata, erdata;

  // 19.44 MHz byte clocks with slightly different phases
  initial #3  forever #25.72 rx_clk[0] = ~rx_clk[0];
  initial #11 forever #25.72 rx_clk[1] = ~rx_clk[1];
  initial #17 forever #25.72 rx_clk[2] = ~rx_clk[2];
  initial #23 forever #25.72 rx_clk[3] = ~rx_clk[3];

  upc_top dut (
    .clk(clk), .rst_n(rst_n),
    .rx_clk(rx_clk), .rx_valid(rx_valid), .rx_soc(rx_soc), .rx_data(rx_data),
    .tx_valid(tx_valid), .tx_soc(tx_soc), .tx_data(tx_data),
    .cpu_sel(sel), .cpu_we(we), .cpu_addr(addr), .cpu_wdata(wdata), .cpu_rdata(rdata),
    .irq(irq),
    .ext_req(ereq), .ext_we(ewe), .ext_addr(eaddr), .ext_wdata(ewdata),
    .ext_ack(eack), .ext_rdata(erdata));

  ext_mem_model #(.LAT(2)) mem (.clk(clk), .req(ereq), .we(ewe), .addr(eaddr),
                                .wdata(ewdata), .ack(eack), .rdata(erdata));

  int checks = 0, failures = 0;
  int sent [4], policed [4], forwarded [4], kept [4];
  int n_early = 0, n_late = 0, n_ovfl = 0;
  int lat_max = 0, lat = 0;
  bit in_req = 0;

  task automatic fail(string s);
    failures++;
    $display("FAIL %s", s);
  endtask

  task automatic cpu_wr(int a, logic [31:0] d);
    @(negedge clk); sel = 1; we = 1; addr = CPU_AW'(a); wdata = d;
    @(negedge clk); sel = 0; we = 0;
  endtask

  task automatic cpu_rd(int a, output logic [31:0] d);
    @(negedge clk); sel = 1; we = 0; addr = CPU_AW'(a); #1 d = rdata;
    @(negedge clk); sel = 0;
  endtask

  task automatic mem_write(logic [ADDR_W-1:0] a, logic [MEM_W-1:0] w);
    logic [31:0] d;
    cpu_wr(8, 32'(a));
    for (int i = 0; i < 5; i++) cpu_wr(10 + i, 32'(w >> (32 * i)));
    cpu_wr(9, 1);
    do cpu_rd(9, d); while (d[0]);
  endtask

  task automatic send_burst(int l, int n, logic [15:0] v0);
    for (int i = 0; i < n; i++) begin
      logic [15:0] v;
      v = v0 + 16'(i % 4);
      for (int k = 0; k < int'(CELL_BYTES); k++) begin
        @(negedge rx_clk[l]);
        rx_valid[l] = 1;
        rx_soc[l]   = (k == 0);
        case (k)
          0: rx_data[l] = 8'h01;
          1: rx_data[l] = {4'h2, v[15:12]};
          2: rx_data[l] = v[11:4];
          3: rx_data[l] = {v[3:0], 4'b0000};
          default: rx_data[l] = 8'(k + i);
        endcase
      end
      sent[l]++;
    end
    @(negedge rx_clk[l]);
    rx_valid[l] = 0; rx_soc[l] = 0;
  endtask

  // decisions, latency of the policing path, outputs, events
  always @(posedge clk) if (rst_n) begin
    if (dut.v_req) begin in_req <= 1; lat <= 1; end
    else if (in_req) lat <= lat + 1;
    if (dut.v_done) begin
      in_req <= 0;
      if (lat + 1 > lat_max) lat_max <= lat + 1;
      policed[dut.u_flow.v_link]++;
      if (dut.v_dec != DEC_DISCARD) kept[dut.u_flow.v_link]++;
    end
    for (int l = 0; l < 4; l++) begin
      if (tx_valid[l] && tx_soc[l]) forwarded[l]++;
      if (dut.ev[4*l + EV_EARLY]) n_early++;
      if (dut.ev[4*l + EV_LATE])  n_late++;
      if (dut.ev[4*l + EV_OVFL])  n_ovfl++;
    end
  end

  task automatic drain();
    int busy;
    do begin
      repeat (200) @(negedge clk);
      busy = int'(dut.v_busy);
      for (int l = 0; l < 4; l++) busy += int'(dut.cell_avail[l]) + int'(dut.out_busy[l]);
    end while (busy != 0);
  endtask

  task automatic check_phase(string what, int late_exp);
    for (int l = 0; l < 4; l++) begin
      checks++;
      if (policed[l] != sent[l]) fail($sformatf("%s link %0d: %0d of %0d cells policed", what, l, policed[l], sent[l]));
      checks++;
      if (forwarded[l] != kept[l]) fail($sformatf("%s link %0d: %0d forwarded, %0d kept", what, l, forwarded[l], kept[l]));
    end
    checks++; if (n_ovfl != 0)  fail($sformatf("%s: %0d FIFO overflows at rated load", what, n_ovfl));
    checks++; if (n_early != 0) fail($sformatf("%s: %0d early syncs", what, n_early));
    checks++; if (n_late != late_exp) fail($sformatf("%s: %0d late syncs, expected %0d", what, n_late, late_exp));
    checks++; if (lat_max > int'(BUDGET)) fail($sformatf("%s: decision took %0d clocks", what, lat_max));
    $display("%s: sent %0d/%0d/%0d/%0d, longest decision %0d clocks", what, sent[0], sent[1], sent[2], sent[3], lat_max);
  endtask

  initial begin
    #40ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  conn_rec_t rec0;
  initial rec0 = '{cnt: 0, e: 8'h0F, tau: 200, t: 540, tat: 0};

  initial begin
    sent = '{default: 0}; policed = '{default: 0}; forwarded = '{default: 0}; kept = '{default: 0};
    rx_data = '{default: 8'h00};
    repeat (5) @(posedge clk);
    rst_n = 1;
    repeat (5) @(posedge clk);
    cpu_wr(1, 8'h00); cpu_wr(2, 8'h0F); cpu_wr(3, 8'hFF); cpu_wr(4, 8'hF0);
    // four connections per link: peak rate of a quarter of the link, generous tolerance
    for (int l = 0; l < 4; l++)
      for (int k = 0; k < 4; k++)
        mem_write({1'b0, 2'(l), 16'd32 + 16'(k)}, MEM_W'(rec0));
    n_late = 0;
    fork
      send_burst(0, N_DIRECT, 16'd32);
      send_burst(1, N_DIRECT, 16'd32);
      send_burst(2, N_DIRECT, 16'd32);
      send_burst(3, N_DIRECT, 16'd32);
    join
    drain();
    check_phase("direct mode", 4);
    // table lookup mode
    cpu_wr(0, 1);
    for (int l = 0; l < 4; l++)
      for (int k = 0; k < 4; k++) begin
        mem_write({1'b1, 2'b00, 2'(l), 14'd200 + 14'(k)}, MEM_W'(16'h3000 + 16'(4 * l + k)));
        mem_write({1'b0, 2'b00, 16'h3000 + 16'(4 * l + k)},
                  MEM_W'(rec0));
      end
    lat_max = 0;
    fork
      send_burst(0, N_TABLE, 16'd200);
      send_burst(1, N_TABLE, 16'd200);
      send_burst(2, N_TABLE, 16'd200);
      send_burst(3, N_TABLE, 16'd200);
    join
    drain();
    check_phase("table lookup mode", 8);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
