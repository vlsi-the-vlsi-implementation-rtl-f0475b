// tb_upc_top: the whole four-link UPC device, at its default parameters,
// with the external memory model and a microprocessor driven from tasks.
//
// The processor sets the header masks to the 16-bit VCI field and writes,
// through the indirect memory window, three connections per link: A (tags
// non-conforming CLP=0 cells), B (discards them) and C (counter-only mode).
// The links then send cells at full load on byte clocks of 51, 53, 47 and
// 9 ns against the 20 ns device clock; link 3 is faster than the device can
// forward and must overflow its FIFO. Link 0 gets one early cell sync, link 2
// loses its byte clock for 20 us, and gaps between cells raise late syncs.
// The device is then switched to table lookup mode, lookup entries and two
// more connections per link are written and a second burst is sent.
//
// A reference model of the connection records follows each decision of the
// VSA unit (using the arrival time the unit latched) and predicts pass, tag
// or discard; each cell leaving a link must be the next cell of that link
// that was not discarded, byte for byte, with the CLP bit set when tagged.
// At the end the records in memory must equal the model's, every cell sent
// must be either policed or counted as an overflow, the status registers
// must show the injected events and clear on a write of ones, and each
// mechanism (pass, tag, discard, counter-only, table lookup, early sync,
// late sync, overflow, missing byte clock, interrupt) must have happened.
module tb_upc_top;
  import upc_pkg::*;

  logic clk = 0, rst_n = 0;
  always #10 clk = ~clk;   // 50 MHz device clock

  logic [3:0] rx_clk = 0, rx_valid = 0, rx_soc = 0, clk_run = 4'hF;
  logic [7:0] rx_data [4];
  logic [3:0] tx_valid, tx_soc;
  logic [7:0] tx_data [4];
  logic              sel = 0, we = 0, irq;
  logic [CPU_AW-1:0] addr = 0;
  logic [31:0]       wdata = 0, rdata;
  logic              ereq, ewe, eack;
  logic [ADDR_W-1:0] eaddr;
  logic [MEM_W-1:0]  ewdata, erdata;

  always #25.5 if (clk_run[0]) rx_clk[0] = ~rx_clk[0];
  always #26.5 if (clk_run[1]) rx_clk[1] = ~rx_clk[1];
  always #23.5 if (clk_run[2]) rx_clk[2] = ~rx_clk[2];
  always #4.5  if (clk_run[3]) rx_clk[3] = ~rx_clk[3];

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
  // mechanism counters
  int n_pass = 0, n_tag = 0, n_disc = 0, n_cntonly = 0, n_table = 0;
  int n_early = 0, n_late = 0, n_ovfl = 0, n_noclk = 0, n_irq = 0;

  task automatic fail(string s);
    failures++;
    $display("FAIL %s", s);
  endtask

  // ------------------------------------------------------------ processor
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

  task automatic mem_read(logic [ADDR_W-1:0] a, output logic [MEM_W-1:0] w);
    logic [31:0] d;
    cpu_wr(8, 32'(a));
    cpu_wr(9, 2);
    do cpu_rd(9, d); while (d[0]);
    w = '0;
    for (int i = 0; i < 5; i++) begin cpu_rd(10 + i, d); w |= MEM_W'(d) << (32 * i); end
  endtask

  // ------------------------------------------------------------ reference
  conn_rec_t model [logic [ADDR_W-1:0]];
  logic [15:0] lut [logic [ADDR_W-1:0]];
  bit tbl = 0;

  task automatic add_conn(logic [ADDR_W-1:0] a, conn_rec_t r);
    model[a] = r;
    mem_write(a, MEM_W'(r));
  endtask

  typedef struct { logic [HDR_W-1:0] hdr; decision_e dec; } exp_t;
  exp_t exp_q [4][$];

  always @(negedge clk) if (rst_n && dut.u_vsa.done) begin
    logic [1:0]        l;
    logic [HDR_W-1:0]  h;
    logic [TIME_W-1:0] t;
    logic [15:0]       vci;
    logic [ADDR_W-1:0] ra;
    conn_rec_t         r;
    decision_e         xd;
    l   = dut.u_flow.v_link;
    h   = dut.u_flow.v_hdr;
    t   = dut.u_vsa.ta;
    vci = h[19:4];
    ra  = tbl ? {1'b0, 2'b00, lut[{1'b1, 2'b00, l, vci[13:0]}]} : {1'b0, l, vci};
    if (tbl) n_table++;
    r   = model[ra];
    if (r.e[E_CNT_ONLY]) begin xd = DEC_PASS; n_cntonly++; end
    else if (signed'(t - r.tat) >= 0) begin xd = DEC_PASS; r.tat = t + r.t; end
    else if (r.tat - t <= r.tau) begin xd = DEC_PASS; r.tat = r.tat + r.t; end
    else if (!h[0] && r.e[E_TAG]) xd = DEC_TAG;
    else xd = DEC_DISCARD;
    if ((xd == DEC_PASS && r.e[E_CNT_PASS]) || (xd == DEC_TAG && r.e[E_CNT_TAG]) ||
        (xd == DEC_DISCARD && r.e[E_CNT_DISC])) r.cnt = r.cnt + 1;
    model[ra] = r;
    case (xd) DEC_PASS: n_pass++; DEC_TAG: n_tag++; default: n_disc++; endcase
    checks++;
    if (dut.u_vsa.dec !== xd) fail($sformatf("link %0d decision %s, expected %s", l, dut.u_vsa.dec.name(), xd.name()));
    exp_q[l].push_back('{hdr: h, dec: xd});
  end

  // ------------------------------------------------------------ links
  int sent [4];
  logic [7:0] cells [4][int][CELL_BYTES];   // sent cells by sequence number

  function automatic logic [7:0] pay(int l, int s, int k);
    return 8'(l * 41 + s * 7 + k * 3);
  endfunction

  // send one cell on link l for VCI v; early_at > 0 adds a cell sync there
  task automatic send_cell(int l, logic [15:0] v, logic clp, int early_at = 0);
    logic [7:0] c [CELL_BYTES];
    int s;
    s = sent[l];
    c[0] = {4'h0, 4'h1};                   // GFC 0, VPI 0x12
    c[1] = {4'h2, v[15:12]};
    c[2] = v[11:4];
    c[3] = {v[3:0], 3'b000, clp};
    c[4] = 8'h55;                          // HEC placeholder
    c[5] = 8'(s >> 8);
    c[6] = 8'(s);
    for (int k = 7; k < int'(CELL_BYTES); k++) c[k] = pay(l, s, k);
    cells[l][s] = c;
    sent[l]++;
    for (int k = 0; k < int'(CELL_BYTES); k++) begin
      @(negedge rx_clk[l]);
      rx_valid[l] = 1;
      rx_soc[l]   = (k == 0) || (early_at != 0 && k == early_at);
      rx_data[l]  = c[k];
    end
  endtask

  task automatic gap(int l, int n);
    repeat (n) begin @(negedge rx_clk[l]); rx_valid[l] = 0; rx_soc[l] = 0; end
  endtask

  // burst of n cells on link l over the given VCIs, gaps now and then
  task automatic burst(int l, int n, logic [15:0] v0, int nv);
    for (int i = 0; i < n; i++) begin
      send_cell(l, v0 + 16'($urandom_range(0, nv - 1)), 1'($urandom_range(0, 3) == 0),
                (l == 0 && i == 5 && !tbl) ? 20 : 0);
      if ($urandom_range(0, 7) == 0) gap(l, $urandom_range(1, 30));
    end
    gap(l, 2);
  endtask

  // ------------------------------------------------------------ outputs
  int got [4];
  for (genvar gl = 0; gl < 4; gl++) begin : g_mon
    logic [7:0] buf_c [CELL_BYTES];
    int nb = 0;
    always @(posedge clk) if (rst_n && tx_valid[gl]) begin
      if ((nb == 0) != tx_soc[gl]) fail($sformatf("link %0d cell sync at byte %0d", gl, nb));
      buf_c[nb] = tx_data[gl];
      nb++;
      if (nb == int'(CELL_BYTES)) begin
        exp_t e;
        int s;
        logic [7:0] x;
        nb = 0;
        do begin
          if (exp_q[gl].size() == 0) begin fail($sformatf("link %0d unexpected cell", gl)); break; end
          e = exp_q[gl].pop_front();
        end while (e.dec == DEC_DISCARD);
        s = {buf_c[5], buf_c[6]};
        checks++;
        if (!cells[gl].exists(s)) fail($sformatf("link %0d cell %0d never sent", gl, s));
        else begin
          for (int k = 0; k < int'(CELL_BYTES); k++) begin
            x = cells[gl][s][k];
            if (k == 3 && e.dec == DEC_TAG) x[0] = 1'b1;
            if (buf_c[k] !== x) begin
              fail($sformatf("link %0d cell %0d byte %0d: %h, expected %h", gl, s, k, buf_c[k], x));
              break;
            end
          end
          if ({cells[gl][s][0], cells[gl][s][1], cells[gl][s][2], cells[gl][s][3]} !== e.hdr)
            fail($sformatf("link %0d cell %0d out of order", gl, s));
        end
        got[gl]++;
      end
    end
  end

  always @(posedge clk) if (rst_n) begin
    for (int l = 0; l < 4; l++) begin
      if (dut.ev[4*l + EV_EARLY]) n_early++;
      if (dut.ev[4*l + EV_LATE])  n_late++;
      if (dut.ev[4*l + EV_OVFL])  n_ovfl++;
      if (dut.ev[4*l + EV_NOCLK]) n_noclk++;
    end
  end
  logic irq_q = 0;
  always @(posedge clk) begin irq_q <= irq; if (irq && !irq_q) n_irq++; end

  task automatic drain();
    int busy;
    do begin
      repeat (200) @(negedge clk);
      busy = 0;
      for (int l = 0; l < 4; l++) busy += int'(dut.cell_avail[l]) + int'(dut.out_busy[l]);
      busy += int'(dut.v_busy);
    end while (busy != 0);
    repeat (20) @(negedge clk);
  endtask

  initial begin
    #30ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d;
    logic [MEM_W-1:0] w;
    int ovfl_link3;
    sent = '{default: 0}; got = '{default: 0};
    rx_data = '{default: 8'h00};
    repeat (5) @(posedge clk);
    rst_n = 1;
    repeat (5) @(posedge clk);
    // ---- configuration: direct mode, VCI as the index, interrupt on link 3 overflow
    cpu_wr(0, 0);
    cpu_wr(1, 8'h00); cpu_wr(2, 8'h0F); cpu_wr(3, 8'hFF); cpu_wr(4, 8'hF0);
    cpu_wr(7, 16'h1 << (4 * 3 + EV_OVFL));
    for (int l = 0; l < 4; l++) begin
      add_conn({1'b0, 2'(l), 16'd32}, '{cnt: 0, e: 8'h0F, tau: 120, t: 200, tat: 0});  // A
      add_conn({1'b0, 2'(l), 16'd33}, '{cnt: 0, e: 8'h0E, tau: 80,  t: 350, tat: 0});  // B
      add_conn({1'b0, 2'(l), 16'd34}, '{cnt: 0, e: 8'h12, tau: 0,   t: 0,   tat: 0});  // C
    end
    mem_read({1'b0, 2'd1, 16'd33}, w);
    checks++;
    if (w !== MEM_W'(model[{1'b0, 2'd1, 16'd33}])) fail("record read back through the processor port");
    // clear the late syncs of the idle links after reset
    cpu_wr(5, 8'hFF); cpu_wr(6, 8'hFF);
    n_late = 0; n_irq = 0;
    // ---- direct mode traffic
    fork
      burst(0, 60, 16'd32, 3);
      burst(1, 60, 16'd32, 3);
      begin
        burst(2, 25, 16'd32, 3);
        clk_run[2] = 0; #20us; clk_run[2] = 1;
        burst(2, 35, 16'd32, 3);
      end
      burst(3, 60, 16'd32, 3);
    join
    drain();
    ovfl_link3 = n_ovfl;
    // status registers
    cpu_rd(5, d);
    checks++;
    if (d[EV_EARLY] !== 1'b1 || d[EV_OVFL] !== 1'b0 || d[4 + EV_LATE] !== 1'b1) fail($sformatf("STATUS0 %h", d));
    cpu_rd(6, d);
    checks++;
    if (d[EV_NOCLK] !== 1'b1 || d[4 + EV_OVFL] !== 1'b1) fail($sformatf("STATUS1 %h", d));
    checks++;
    if (irq !== 1'b1) fail("interrupt not raised by the link 3 overflow");
    cpu_wr(5, 8'hFF); cpu_wr(6, 8'hFF);
    cpu_rd(5, d); checks++; if (d != 0) fail("STATUS0 not cleared");
    cpu_rd(6, d); checks++; if (d != 0) fail("STATUS1 not cleared");
    checks++;
    if (irq !== 1'b0) fail("interrupt not cleared");
    // ---- table lookup mode
    cpu_wr(0, 1);
    tbl = 1;
    for (int l = 0; l < 4; l++)
      for (int k = 0; k < 2; k++) begin
        logic [ADDR_W-1:0] la;
        la = {1'b1, 2'b00, 2'(l), 14'd100 + 14'(k)};
        lut[la] = 16'h1000 + 16'(2 * l + k);
        mem_write(la, MEM_W'(lut[la]));
        add_conn({1'b0, 2'b00, lut[la]}, '{cnt: 0, e: (k == 0) ? 8'h0F : 8'h0E, tau: 100, t: 250, tat: 0});
      end
    fork
      burst(0, 30, 16'd100, 2);
      burst(1, 30, 16'd100, 2);
      burst(2, 30, 16'd100, 2);
      burst(3, 30, 16'd100, 2);
    join
    drain();
    // ---- final checks
    for (int l = 0; l < 4; l++) begin
      checks++;
      foreach (exp_q[l][i]) if (exp_q[l][i].dec != DEC_DISCARD) fail($sformatf("link %0d cell not forwarded", l));
    end
    foreach (model[a]) begin
      checks++;
      if (conn_rec_t'(mem.peek(a)) !== model[a]) fail($sformatf("record %h differs from the model", a));
    end
    checks++;
    if (n_pass + n_tag + n_disc + n_ovfl != sent[0] + sent[1] + sent[2] + sent[3])
      fail($sformatf("%0d policed + %0d overflowed != %0d sent", n_pass + n_tag + n_disc, n_ovfl,
                     sent[0] + sent[1] + sent[2] + sent[3]));
    $display("sent %0d/%0d/%0d/%0d forwarded %0d/%0d/%0d/%0d", sent[0], sent[1], sent[2], sent[3],
             got[0], got[1], got[2], got[3]);
    $display("pass %0d tag %0d discard %0d counter-only %0d table-mode %0d", n_pass, n_tag, n_disc, n_cntonly, n_table);
    $display("early sync %0d late sync %0d overflow %0d (direct phase %0d) missing clock %0d irq %0d",
             n_early, n_late, n_ovfl, ovfl_link3, n_noclk, n_irq);
    checks++; if (n_pass == 0)    fail("no cell passed");
    checks++; if (n_tag == 0)     fail("no cell tagged");
    checks++; if (n_disc == 0)    fail("no cell discarded");
    checks++; if (n_cntonly == 0) fail("counter-only mode never used");
    checks++; if (n_table == 0)   fail("table lookup mode never used");
    checks++; if (n_early == 0)   fail("no early sync");
    checks++; if (n_late == 0)    fail("no late sync");
    checks++; if (n_ovfl == 0)    fail("no FIFO overflow");
    checks++; if (n_noclk == 0)   fail("no missing byte clock");
    checks++; if (n_irq == 0)     fail("no interrupt");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
