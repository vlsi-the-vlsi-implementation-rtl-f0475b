// tb_clp_tag_discard: a behavioural cell FIFO feeds the output stage, which
// is started with random decisions. The output is checked byte by byte:
// passed cells unchanged, tagged cells with bit 0 of byte 3 set, discarded
// cells absent. Also checked: tx_soc on the first byte only, one pop per
// cell, 53 output clocks per forwarded cell and one clock per discard.
module tb_clp_tag_discard;
  import upc_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic       start = 0, busy, pop, tx_valid, tx_soc;
  decision_e  dec = DEC_PASS;
  logic [5:0] rd_idx;
  logic [7:0] rd_data, tx_data;
  int checks = 0, failures = 0;
  int head = 0;        // cell number at the FIFO head
  int pops = 0;
  logic [7:0] exp_q [$];
  int n_pass = 0, n_tag = 0, n_disc = 0;

  clp_tag_discard dut (.clk(clk), .rst_n(rst_n), .start(start), .dec(dec), .busy(busy),
                       .rd_idx(rd_idx), .rd_data(rd_data), .pop(pop),
                       .tx_valid(tx_valid), .tx_soc(tx_soc), .tx_data(tx_data));

  function automatic logic [7:0] cbyte(int n, int k);
    return 8'(n * 31 + k * 5) & ((k == 3) ? 8'hFE : 8'hFF);  // CLP=0 in every cell
  endfunction

  assign rd_data = cbyte(head, int'(rd_idx));
  always @(posedge clk) if (pop) begin head <= head + 1; pops++; end

  int byte_no = 0;
  always @(posedge clk) if (rst_n && tx_valid) begin
    logic [7:0] x;
    x = exp_q.pop_front();
    checks++;
    if (tx_data !== x || tx_soc !== (byte_no == 0)) begin
      failures++; $display("FAIL byte %0d: %h soc %b exp %h", byte_no, tx_data, tx_soc, x);
    end
    byte_no = (byte_no + 1) % CELL_BYTES;
  end

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 60; c++) begin
      decision_e d;
      int cyc, p0;
      d = decision_e'($urandom_range(0, 2));
      for (int k = 0; k < int'(CELL_BYTES) && d != DEC_DISCARD; k++)
        exp_q.push_back(cbyte(head, k) | ((d == DEC_TAG && k == 3) ? 8'h01 : 8'h00));
      case (d) DEC_PASS: n_pass++; DEC_TAG: n_tag++; default: n_disc++; endcase
      @(negedge clk);
      checks++;
      if (busy) begin failures++; $display("FAIL busy before start"); end
      start = 1; dec = d; p0 = pops;
      @(negedge clk);
      start = 0;
      cyc = 0;
      while (busy) begin @(negedge clk); cyc++; end
      checks++;
      if (pops != p0 + 1 || cyc != ((d == DEC_DISCARD) ? 1 : int'(CELL_BYTES))) begin
        failures++; $display("FAIL cell %0d (%s): %0d pops, %0d clocks", c, d.name(), pops - p0, cyc);
      end
      repeat ($urandom_range(0, 3)) @(negedge clk);
    end
    repeat (5) @(negedge clk);
    checks++;
    if (exp_q.size() != 0 || n_tag == 0 || n_disc == 0) begin
      failures++; $display("FAIL %0d bytes missing", exp_q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
