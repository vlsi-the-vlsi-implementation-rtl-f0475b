// tb_header_extract: random headers and masks against a reference that walks
// the header in transmission order (bit 31 first), collects the selected bits
// in a queue and keeps the last 16 of them. Also checks the edge cases of an
// empty mask, a full mask and exactly 16 selected bits. A second instance
// with an 8-bit index (the other width the design may be built with) is
// checked against the same reference keeping the last 8 bits.
module tb_header_extract;
  import upc_pkg::*;

  logic [HDR_W-1:0] hdr, mask;
  logic [EXT_W-1:0] idx;
  logic [7:0]       idx8;
  int checks = 0, failures = 0;

  header_extract dut (.hdr(hdr), .mask(mask), .idx(idx));
  header_extract #(.XW(8)) dut8 (.hdr(hdr), .mask(mask), .idx(idx8));

  function automatic logic [EXT_W-1:0] ref_idx(logic [HDR_W-1:0] h, logic [HDR_W-1:0] m, int w = EXT_W);
    bit q[$];
    logic [EXT_W-1:0] r;
    for (int p = HDR_W - 1; p >= 0; p--) if (m[p]) q.push_back(h[p]);
    r = '0;
    // the last collected bit is the least significant
    for (int k = 0; k < w && q.size() > 0; k++) r[k] = q.pop_back();
    return r;
  endfunction

  task automatic check_one(logic [HDR_W-1:0] h, logic [HDR_W-1:0] m);
    hdr = h; mask = m;
    #1;
    checks++;
    if (idx !== ref_idx(h, m)) begin
      failures++;
      $display("FAIL hdr=%h mask=%h idx=%h exp=%h", h, m, idx, ref_idx(h, m));
    end
    checks++;
    if (16'(idx8) !== ref_idx(h, m, 8)) begin
      failures++;
      $display("FAIL 8-bit hdr=%h mask=%h idx=%h exp=%h", h, m, idx8, ref_idx(h, m, 8));
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check_one(32'hFFFF_FFFF, 32'h0);
    check_one(32'hA5C3_0F96, 32'hFFFF_FFFF);
    check_one(32'hA5C3_0F96, 32'h0FFF_F000);       // VCI field only
    check_one(32'h1234_5678, 32'h00FF_FF00);       // exactly 16 bits
    check_one(32'h0000_0001, 32'h0000_0001);       // CLP alone
    check_one(32'h8000_0000, 32'h8000_0001);       // first and last bit
    for (int i = 0; i < 2000; i++) check_one($urandom, $urandom & $urandom);
    for (int i = 0; i < 2000; i++) check_one($urandom, $urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
