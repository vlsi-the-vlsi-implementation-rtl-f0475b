// tb_cell_flow_control: four links with randomly arriving cells, a stand-in
// for the VSA unit that answers after a random delay with a decision derived
// from the header, and stand-in output stages that stay busy for random
// times. Checked: every start goes to the link whose header was sent, with
// the decision for that header; no link is started while busy or without a
// cell; the CLP bit sent is header bit 0; with all links always ready the
// service order is strict round robin; every cell is served.
module tb_cell_flow_control;
  import upc_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [3:0]        avail = 0, obusy = 0, start;
  logic [HDR_W-1:0]  hdr [4];
  decision_e         sdec, vdec = DEC_PASS;
  logic              vreq, vclp, vdone = 0;
  logic [LINK_W-1:0] vlink;
  logic [HDR_W-1:0]  vhdr;
  int checks = 0, failures = 0;
  int pending [4];      // cells waiting per link
  int seq [4];          // header sequence per link
  int served [4];
  int order [$];
  bit random_mode = 1;

  cell_flow_control dut (.clk(clk), .rst_n(rst_n), .cell_avail(avail), .hdr(hdr),
                         .out_busy(obusy), .start(start), .start_dec(sdec),
                         .v_req(vreq), .v_link(vlink), .v_hdr(vhdr), .v_clp(vclp),
                         .v_done(vdone), .v_dec(vdec));

  function automatic decision_e dec_of(logic [HDR_W-1:0] h);
    return decision_e'(h[2:1] % 3);
  endfunction

  always_comb for (int l = 0; l < 4; l++) begin
    avail[l] = pending[l] > 0;
    hdr[l]   = {8'(l), 16'(seq[l]), 5'(seq[l] * 3), 3'(seq[l])};
  end

  // VSA stand-in (samples and drives between clock edges)
  initial forever begin
    @(negedge clk);
    if (vreq) begin
      logic [HDR_W-1:0] h;
      logic [LINK_W-1:0] l;
      h = vhdr; l = vlink;
      checks++;
      if (!avail[l] || obusy[l] || h !== hdr[l] || vclp !== h[0]) begin
        failures++; $display("FAIL request link %0d", l);
      end
      repeat (random_mode ? $urandom_range(1, 12) : 4) @(negedge clk);
      vdone = 1; vdec = dec_of(h);
      @(negedge clk);
      vdone = 0;
      checks++;
      if (start !== (4'b1 << l) || sdec !== dec_of(h)) begin
        failures++; $display("FAIL start %b dec %s for link %0d", start, sdec.name(), l);
      end
    end
  end

  // output stand-ins: consume the cell when started, then stay busy a while
  for (genvar l = 0; l < 4; l++) begin : g_out
    initial forever begin
      @(negedge clk);
      if (start[l]) begin
        obusy[l] = 1;
        pending[l]--; seq[l]++; served[l]++; order.push_back(l);
        repeat (random_mode ? $urandom_range(1, 60) : 1) @(negedge clk);
        obusy[l] = 0;
      end
    end
  end

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int total;
    pending = '{default: 0}; seq = '{default: 0}; served = '{default: 0};
    repeat (3) @(posedge clk);
    rst_n = 1;
    total = 0;
    for (int i = 0; i < 200; i++) begin
      int l;
      @(negedge clk);
      l = $urandom_range(0, 3);
      pending[l]++; total++;
      repeat ($urandom_range(0, 10)) @(negedge clk);
    end
    wait (pending[0] + pending[1] + pending[2] + pending[3] == 0);
    repeat (30) @(negedge clk);
    checks++;
    if (served[0] + served[1] + served[2] + served[3] != total) begin
      failures++; $display("FAIL served %0d of %0d", served[0] + served[1] + served[2] + served[3], total);
    end
    // all links always ready: strict round robin
    random_mode = 0;
    order.delete();
    pending = '{40, 40, 40, 40};
    wait (pending[0] + pending[1] + pending[2] + pending[3] == 0);
    for (int i = 1; i < order.size(); i++) begin
      checks++;
      if (order[i] != (order[i-1] + 1) % 4) begin failures++; $display("FAIL order at %0d", i); end
    end
    repeat (10) @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
