// tb_input_port: one link receiver with its byte clock (14 ns) running
// asynchronously to the 50 MHz device clock. Cells carry a cell number in
// every byte pattern so that the reader can check the content, the header
// word and the order of every cell taken from the FIFO. Scenarios and the
// events they must raise:
//   back-to-back cells                       no event
//   a gap after a cell                       one late sync
//   a cell sync inside a cell                one early sync, cell kept intact
//   six cells while the reader is stopped    four kept, two overflows
//   byte clock stopped                       one missing byte clock
module tb_input_port;
  import upc_pkg::*;

  localparam int unsigned MISS = 64;
  logic clk = 0, rx_clk = 0, rst_n = 0;
  logic rx_run = 1;
  always #10 clk = ~clk;
  always #7  if (rx_run) rx_clk = ~rx_clk;

  logic rx_valid = 0, rx_soc = 0;
  logic [7:0] rx_data = 0;
  logic cell_avail, pop;
  logic [HDR_W-1:0] hdr;
  logic [5:0] rd_idx;
  logic [7:0] rd_data;
  logic [EV_PER_LINK-1:0] ev;
  int checks = 0, failures = 0;
  int n_ev [EV_PER_LINK];
  int exp_q [$];
  bit reader_on = 1;
  int n_read = 0;

  input_port #(.MISS_CYC(MISS)) dut (
    .rst_n(rst_n), .rx_clk(rx_clk), .rx_valid(rx_valid), .rx_soc(rx_soc), .rx_data(rx_data),
    .clk(clk), .cell_avail(cell_avail), .hdr(hdr), .rd_idx(rd_idx), .rd_data(rd_data),
    .pop(pop), .ev(ev));

  function automatic logic [7:0] cbyte(int n, int k);
    return 8'(n * 7 + k * 13 + (k == 0 ? 8'hA0 : 0));
  endfunction

  // send cell n; early_at > 0 raises cell sync again at that byte
  task automatic send_cell(int n, int early_at = 0);
    for (int k = 0; k < int'(CELL_BYTES); k++) begin
      @(negedge rx_clk);
      rx_valid = 1;
      rx_soc   = (k == 0) || (early_at != 0 && k == early_at);
      rx_data  = cbyte(n, k);
    end
  endtask

  task automatic idle(int n);
    repeat (n) begin @(negedge rx_clk); rx_valid = 0; rx_soc = 0; end
  endtask

  always @(posedge clk) if (rst_n) for (int e = 0; e < int'(EV_PER_LINK); e++) if (ev[e]) n_ev[e]++;

  // reader: checks every byte of the head cell, then pops it
  initial begin
    rd_idx = 0; pop = 0;
    forever begin
      @(negedge clk);
      pop = 0;
      if (reader_on && cell_avail) begin
        int n;
        logic [HDR_W-1:0] xh;
        n = exp_q.pop_front();
        xh = {cbyte(n, 0), cbyte(n, 1), cbyte(n, 2), cbyte(n, 3)};
        checks++;
        if (hdr !== xh) begin failures++; $display("FAIL hdr %h exp %h (cell %0d)", hdr, xh, n); end
        for (int k = 0; k < int'(CELL_BYTES); k++) begin
          rd_idx = 6'(k);
          #1;
          checks++;
          if (rd_data !== cbyte(n, k)) begin
            failures++; $display("FAIL cell %0d byte %0d: %h exp %h", n, k, rd_data, cbyte(n, k));
          end
          @(negedge clk);
        end
        pop = 1;
        n_read++;
      end
    end
  end

  task automatic expect_events(int early, int late, int ovfl, int noclk, string what);
    checks++;
    if (n_ev[EV_EARLY] != early || n_ev[EV_LATE] != late || n_ev[EV_OVFL] != ovfl ||
        n_ev[EV_NOCLK] != noclk) begin
      failures++;
      $display("FAIL %s: events early %0d late %0d ovfl %0d noclk %0d", what,
               n_ev[EV_EARLY], n_ev[EV_LATE], n_ev[EV_OVFL], n_ev[EV_NOCLK]);
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    n_ev = '{default: 0};
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (3) @(posedge clk);
    // back-to-back cells, then a gap: one late sync
    for (int n = 0; n < 3; n++) begin exp_q.push_back(n); send_cell(n); end
    idle(20);
    repeat (300) @(posedge clk);
    checks++;
    if (n_read != 3) begin failures++; $display("FAIL read %0d cells", n_read); end
    expect_events(0, 1, 0, 0, "stream");
    // early sync inside cell 3
    exp_q.push_back(3); send_cell(3, 20);
    exp_q.push_back(4); send_cell(4);
    idle(20);
    repeat (300) @(posedge clk);
    expect_events(1, 2, 0, 0, "early sync");
    // overflow: reader stopped, six cells sent, cells 5..8 kept
    reader_on = 0;
    repeat (200) @(posedge clk);
    for (int n = 5; n < 11; n++) begin if (n < 9) exp_q.push_back(n); send_cell(n); end
    idle(20);
    repeat (20) @(posedge clk);
    expect_events(1, 3, 2, 0, "overflow");
    reader_on = 1;
    repeat (600) @(posedge clk);
    checks++;
    if (n_read != 9 || exp_q.size() != 0) begin failures++; $display("FAIL after overflow read %0d", n_read); end
    // room again after the FIFO drained
    exp_q.push_back(11); send_cell(11);
    idle(4);
    repeat (200) @(posedge clk);
    checks++;
    if (n_read != 10) begin failures++; $display("FAIL cell after overflow not read"); end
    // missing byte clock
    rx_run = 0;
    repeat (3 * MISS) @(posedge clk);
    expect_events(1, 4, 2, 1, "missing clock");
    rx_run = 1;
    repeat (50) @(posedge clk);
    expect_events(1, 4, 2, 1, "clock back");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
