// tb_vsa_unit: the VSA unit with the memory controller and memory model.
// Connection records are preloaded with poke; cells are requested with
// random gaps on a few connections of all four links, in direct mode and
// then in table lookup mode. A reference model keeps its own copy of every
// record and applies the VSA rule with the arrival time read from the
// unit's time base; the decision and the record written back to memory are
// compared for every cell, and the request-to-done time is checked against
// the access count (2 accesses direct, 3 in table mode).
module tb_vsa_unit;
  import upc_pkg::*;

  localparam int unsigned LAT = 2;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic              table_mode, req, clp, busy, done;
  logic [LINK_W-1:0] link;
  logic [EXT_W-1:0]  idx;
  decision_e         dec;
  logic [TIME_W-1:0] now;
  logic [1:0]        c_req, c_we, c_done;
  logic [ADDR_W-1:0] c_addr  [2];
  logic [MEM_W-1:0]  c_wdata [2];
  logic [MEM_W-1:0]  c_rdata;
  logic              ereq, ewe, eack;
  logic [ADDR_W-1:0] eaddr;
  logic [MEM_W-1:0]  ewdata, erdata;
  int checks = 0, failures = 0;
  int n_tag = 0, n_disc = 0, n_pass = 0;

  vsa_unit dut (.clk(clk), .rst_n(rst_n), .table_mode(table_mode), .req(req), .link(link),
                .idx(idx), .clp(clp), .busy(busy), .done(done), .dec(dec),
                .m_req(c_req[0]), .m_we(c_we[0]), .m_addr(c_addr[0]), .m_wdata(c_wdata[0]),
                .m_done(c_done[0]), .m_rdata(c_rdata), .now(now));
  assign c_req[1] = 1'b0; assign c_we[1] = 1'b0;
  assign c_addr[1] = '0;  assign c_wdata[1] = '0;
  mem_ctrl u_mc (.clk(clk), .rst_n(rst_n), .cli_req(c_req), .cli_we(c_we), .cli_addr(c_addr),
                 .cli_wdata(c_wdata), .cli_done(c_done), .rdata(c_rdata),
                 .ext_req(ereq), .ext_we(ewe), .ext_addr(eaddr), .ext_wdata(ewdata),
                 .ext_ack(eack), .ext_rdata(erdata));
  ext_mem_model #(.LAT(LAT)) mem (.clk(clk), .req(ereq), .we(ewe), .addr(eaddr),
                                  .wdata(ewdata), .ack(eack), .rdata(erdata));

  conn_rec_t model [logic [ADDR_W-1:0]];

  task automatic police(logic [LINK_W-1:0] l, logic [EXT_W-1:0] x, logic c, int nacc);
    logic [ADDR_W-1:0] ra;
    conn_rec_t r;
    logic [TIME_W-1:0] t;
    decision_e xd;
    int cyc;
    ra = table_mode ? {1'b0, 2'b00, mem.peek({1'b1, 2'b00, l, x[13:0]})[15:0]} : {1'b0, l, x};
    @(negedge clk);
    req = 1; link = l; idx = x; clp = c;
    t = now;
    @(negedge clk);
    req = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    r = model[ra];
    if (r.e[E_CNT_ONLY]) xd = DEC_PASS;
    else if (signed'(t - r.tat) >= 0) begin xd = DEC_PASS; r.tat = t + r.t; end
    else if (r.tat - t <= r.tau) begin xd = DEC_PASS; r.tat = r.tat + r.t; end
    else if (!c && r.e[E_TAG]) xd = DEC_TAG;
    else xd = DEC_DISCARD;
    if ((xd == DEC_PASS && r.e[E_CNT_PASS]) || (xd == DEC_TAG && r.e[E_CNT_TAG]) ||
        (xd == DEC_DISCARD && r.e[E_CNT_DISC])) r.cnt = r.cnt + 1;
    model[ra] = r;
    case (xd) DEC_PASS: n_pass++; DEC_TAG: n_tag++; default: n_disc++; endcase
    checks++;
    if (dec !== xd) begin failures++; $display("FAIL dec %s exp %s", dec.name(), xd.name()); end
    checks++;
    if (conn_rec_t'(mem.peek(ra)) !== r) begin failures++; $display("FAIL record at %h", ra); end
    checks++;
    if (cyc != nacc * (int'(LAT) + 4) + 2) begin
      failures++; $display("FAIL latency %0d for %0d accesses", cyc, nacc);
    end
  endtask

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    conn_rec_t r;
    req = 0; link = 0; idx = 0; clp = 0; table_mode = 0;
    // direct mode records: link l, index 16'h0100 + k
    for (int l = 0; l < 4; l++)
      for (int k = 0; k < 3; k++) begin
        r = '{cnt: 0, e: (k == 2) ? 8'h12 : 8'h0F - 8'(k), tau: 30 + 10 * k, t: 60 + 20 * l, tat: 0};
        mem.poke({1'b0, 2'(l), 16'h0100 + 16'(k)}, MEM_W'(r));
        model[{1'b0, 2'(l), 16'h0100 + 16'(k)}] = r;
      end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 300; i++) begin
      repeat ($urandom_range(0, 40)) @(negedge clk);
      police(2'($urandom), 16'h0100 + 16'($urandom_range(0, 2)), 1'($urandom), 2);
    end
    // table lookup mode: header index 16'h0A00+k of link l maps to connection 0x2000+4k+l
    table_mode = 1;
    for (int l = 0; l < 4; l++)
      for (int k = 0; k < 2; k++) begin
        mem.poke({1'b1, 2'b00, 2'(l), 14'h0A00 + 14'(k)}, MEM_W'(16'h2000 + 16'(4 * k + l)));
        r = '{cnt: 0, e: 8'h0F, tau: 25, t: 70, tat: 0};
        mem.poke({1'b0, 2'b00, 16'h2000 + 16'(4 * k + l)}, MEM_W'(r));
        model[{1'b0, 2'b00, 16'h2000 + 16'(4 * k + l)}] = r;
      end
    for (int i = 0; i < 200; i++) begin
      repeat ($urandom_range(0, 40)) @(negedge clk);
      police(2'($urandom), 16'h0A00 + 16'($urandom_range(0, 1)), 1'($urandom), 3);
    end
    checks++;
    if (n_tag == 0 || n_disc == 0 || n_pass == 0) begin
      failures++; $display("FAIL not every outcome seen: pass %0d tag %0d discard %0d", n_pass, n_tag, n_disc);
    end
    $display("pass %0d tag %0d discard %0d", n_pass, n_tag, n_disc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
