// input_port: receiver of one ATM link with a four-cell dual-clock FIFO.
//
// Write side (rx_clk, the link's byte clock): a byte with rx_valid and
// rx_soc (cell sync) starts a cell; the following 52 valid bytes belong to
// the same cell. A cell sync seen while those bytes are loading is ignored
// and reported as an early sync. If the clock cycle right after the last
// byte of a cell carries no cell sync, a late sync is reported (links with a
// gap between cells simply ignore this bit). A cell that starts while the
// FIFO already holds FIFO_CELLS cells is discarded as a whole and reported
// as an overflow. A completed cell is committed by advancing the Gray-coded
// write pointer; the FIFO only couples the two clocks and does not adapt rates.
//
// Read side (clk, the 50 MHz device clock): cell_avail says that a complete
// cell is waiting, hdr gives its first four bytes, rd_data is byte rd_idx of
// it (combinational read), and pop releases it. Status events are carried
// into the clk domain by toggle synchronisers and appear there as one-cycle
// pulses on ev (bit order in upc_pkg: early, late, overflow, missing clock).
// The missing byte clock event fires once when rx_clk has not been seen
// for MISS_CYC device clocks.
//
// Framing, the 53-byte cell, the four-cell FIFO and the four events follow
// the document; the rx_valid qualifier, the pointer synchronisers and
// MISS_CYC are this design's choices. rst_n resets both domains asynchronously.
module input_port
  import upc_pkg::*;
#(
  parameter int unsigned NCELL    = FIFO_CELLS,  // FIFO depth in cells, a power of two
  parameter int unsigned MISS_CYC = 256          // device clocks without rx_clk => missing clock
) (
  input  logic                 rst_n,
  // link side
  input  logic                 rx_clk,
  input  logic                 rx_valid,
  input  logic                 rx_soc,
  input  logic [7:0]           rx_data,
  // device side
  input  logic                 clk,
  output logic                 cell_avail,
  output logic [HDR_W-1:0]     hdr,
  input  logic [5:0]           rd_idx,
  output logic [7:0]           rd_data,
  input  logic                 pop,
  output logic [EV_PER_LINK-1:0] ev
);

  localparam int unsigned SW = $clog2(NCELL);   // slot index width
  localparam int unsigned PW = SW + 1;          // pointer width

  function automatic logic [PW-1:0] bin2gray(logic [PW-1:0] b);
    return b ^ (b >> 1);
  endfunction

  function automatic logic [PW-1:0] gray2bin(logic [PW-1:0] g);
    logic [PW-1:0] b;
    b[PW-1] = g[PW-1];
    for (int i = int'(PW) - 2; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  logic [7:0]       mem     [NCELL*CELL_BYTES];
  logic [HDR_W-1:0] hdr_mem [NCELL];

  // ---------------------------------------------------------------- rx_clk
  logic [PW-1:0] wptr, wptr_g;
  logic [PW-1:0] rptr, rptr_g_sys;   // read pointer, clk domain
  logic [PW-1:0] rptr_g_w1, rptr_g_w2;
  logic          loading, drop, after_last;
  logic [5:0]    widx;
  logic          tog_early, tog_late, tog_ovfl, tog_clk;
  logic          full_w;

  assign full_w = (wptr - gray2bin(rptr_g_w2)) == PW'(NCELL);

  always_ff @(posedge rx_clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr       <= '0;
      wptr_g     <= '0;
      rptr_g_w1  <= '0;
      rptr_g_w2  <= '0;
      loading    <= 1'b0;
      drop       <= 1'b0;
      after_last <= 1'b0;
      widx       <= '0;
      tog_early  <= 1'b0;
      tog_late   <= 1'b0;
      tog_ovfl   <= 1'b0;
      tog_clk    <= 1'b0;
    end else begin
      rptr_g_w1  <= rptr_g_sys;
      rptr_g_w2  <= rptr_g_w1;
      tog_clk    <= ~tog_clk;
      after_last <= 1'b0;
      if (after_last && !(rx_valid && rx_soc)) tog_late <= ~tog_late;
      if (rx_valid) begin
        if (!loading) begin
          if (rx_soc) begin
            loading <= 1'b1;
            widx    <= 6'd1;
            drop    <= full_w;
            if (full_w) tog_ovfl <= ~tog_ovfl;
          end
        end else begin
          if (rx_soc) tog_early <= ~tog_early;
          widx <= widx + 6'd1;
          if (widx == 6'(CELL_BYTES - 1)) begin
            loading    <= 1'b0;
            after_last <= 1'b1;
            if (!drop) begin
              wptr   <= wptr + 1'b1;
              wptr_g <= bin2gray(wptr + 1'b1);
            end
          end
        end
      end
    end
  end

  // cell storage, written in the rx_clk domain
  logic          wr_en;
  logic [5:0]    wr_byte;
  assign wr_en   = rx_valid && (loading ? !drop : (rx_soc && !full_w));
  assign wr_byte = loading ? widx : 6'd0;

  always_ff @(posedge rx_clk) begin
    if (wr_en) begin
      mem[int'(wptr[SW-1:0]) * CELL_BYTES + int'(wr_byte)] <= rx_data;
      if (wr_byte < 6'(HDR_BYTES))
        hdr_mem[wptr[SW-1:0]][HDR_W-1-8*int'(wr_byte) -: 8] <= rx_data;
    end
  end

  // ---------------------------------------------------------------- clk
  logic [PW-1:0] wptr_g_s1, wptr_g_s2;
  logic [2:0]    s_early, s_late, s_ovfl, s_clk;
  logic [$clog2(MISS_CYC+1)-1:0] miss_cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rptr       <= '0;
      rptr_g_sys <= '0;
      wptr_g_s1  <= '0;
      wptr_g_s2  <= '0;
      s_early    <= '0;
      s_late     <= '0;
      s_ovfl     <= '0;
      s_clk      <= '0;
      miss_cnt   <= '0;
    end else begin
      wptr_g_s1 <= wptr_g;
      wptr_g_s2 <= wptr_g_s1;
      s_early   <= {s_early[1:0], tog_early};
      s_late    <= {s_late[1:0],  tog_late};
      s_ovfl    <= {s_ovfl[1:0],  tog_ovfl};
      s_clk     <= {s_clk[1:0],   tog_clk};
      if (pop && cell_avail) begin
        rptr       <= rptr + 1'b1;
        rptr_g_sys <= bin2gray(rptr + 1'b1);
      end
      if (s_clk[2] != s_clk[1])            miss_cnt <= '0;
      else if (miss_cnt != MISS_CYC[$bits(miss_cnt)-1:0]) miss_cnt <= miss_cnt + 1'b1;
    end
  end

  assign cell_avail = (rptr != gray2bin(wptr_g_s2));
  assign hdr        = hdr_mem[rptr[SW-1:0]];
  assign rd_data    = mem[int'(rptr[SW-1:0]) * CELL_BYTES + int'(rd_idx)];

  always_comb begin
    ev            = '0;
    ev[EV_EARLY]  = s_early[2] ^ s_early[1];
    ev[EV_LATE]   = s_late[2]  ^ s_late[1];
    ev[EV_OVFL]   = s_ovfl[2]  ^ s_ovfl[1];
    ev[EV_NOCLK]  = (s_clk[2] == s_clk[1]) &&
                    (miss_cnt == MISS_CYC[$bits(miss_cnt)-1:0] - 1'b1);
  end

endmodule
