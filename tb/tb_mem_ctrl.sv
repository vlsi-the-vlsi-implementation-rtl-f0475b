// tb_mem_ctrl: two clients issue random reads and writes through the
// controller into the memory model. Every read is compared with a shadow
// copy of the memory, each access must finish within its latency bound
// (memory latency + 3 clocks when the other client is idle), and the round
// robin is checked by counting that both clients are served when both
// request all the time.
module tb_mem_ctrl;
  import upc_pkg::*;

  localparam int unsigned LAT = 3;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [1:0]        req, we, done;
  logic [ADDR_W-1:0] addr  [2];
  logic [MEM_W-1:0]  wdata [2];
  logic [MEM_W-1:0]  rdata;
  logic              ereq, ewe, eack;
  logic [ADDR_W-1:0] eaddr;
  logic [MEM_W-1:0]  ewdata, erdata;
  int checks = 0, failures = 0;
  logic [MEM_W-1:0]  shadow [16];
  int                served [2];

  mem_ctrl dut (.clk(clk), .rst_n(rst_n), .cli_req(req), .cli_we(we), .cli_addr(addr),
                .cli_wdata(wdata), .cli_done(done), .rdata(rdata),
                .ext_req(ereq), .ext_we(ewe), .ext_addr(eaddr), .ext_wdata(ewdata),
                .ext_ack(eack), .ext_rdata(erdata));
  ext_mem_model #(.LAT(LAT)) mem (.clk(clk), .req(ereq), .we(ewe), .addr(eaddr),
                                  .wdata(ewdata), .ack(eack), .rdata(erdata));

  function automatic logic [MEM_W-1:0] rnd();
    return {$urandom, $urandom, $urandom, $urandom, $urandom};
  endfunction

  // one access by client c; returns the clocks it took
  task automatic access(int c, bit w, int a, output int cyc);
    @(negedge clk);
    req[c] = 1; we[c] = w; addr[c] = ADDR_W'(a); wdata[c] = rnd();
    cyc = 0;
    do begin @(posedge clk); cyc++; #1; end while (!done[c]);
    if (w) shadow[a] = wdata[c];
    else begin
      checks++;
      if (rdata !== shadow[a]) begin failures++; $display("FAIL read c%0d a%0d", c, a); end
    end
    served[c]++;
    @(negedge clk);
    req[c] = 0;
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc;
    req = 0; we = 0; addr = '{default: '0}; wdata = '{default: '0};
    served = '{0, 0};
    for (int a = 0; a < 16; a++) shadow[a] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // single client: latency bound
    for (int i = 0; i < 40; i++) begin
      access(i % 2, 1'($urandom), $urandom_range(0, 15), cyc);
      checks++;
      if (cyc > int'(LAT) + 3) begin failures++; $display("FAIL latency %0d", cyc); end
    end
    // both clients at once
    served = '{0, 0};
    fork
      for (int i = 0; i < 60; i++) begin int c0; access(0, 1'($urandom), $urandom_range(0, 7), c0); end
      for (int i = 0; i < 60; i++) begin int c1; access(1, 1'($urandom), $urandom_range(8, 15), c1); end
    join
    checks++;
    if (served[0] != 60 || served[1] != 60) begin failures++; $display("FAIL served %0d %0d", served[0], served[1]); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
