// vsa_unit: polices one cell at a time against its connection record.
//
// For each request (link, extracted header index, CLP bit) the unit
//   1. in table lookup mode reads the lookup table entry at
//      {1, 00, link, index[13:0]} and takes its low 16 bits as the
//      connection number; in direct mode the record address is {0, link, index},
//   2. reads the connection record (TAT, T, tau, E, counter),
//   3. decides with vsa_core, the arrival time being the value of a
//      free-running device-clock tick counter when the request was accepted,
//   4. writes the updated record back and pulses done with the decision.
// Memory accesses go through mem_ctrl's client handshake (m_req held until
// m_done). From req to done a cell takes n * A + 2 clocks, A being one
// memory access as mem_ctrl serves it and n = 2 in direct mode, 3 in table
// lookup mode (14 and 20 clocks with a memory that answers in 3 clocks).
//
// Direct mode with 64K connections per link (256K in total) and table lookup
// mode with 64K in total follow the document, as do the four record fields
// and the counter; the memory map and the time unit (one device clock) are
// this design's choices.
module vsa_unit
  import upc_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               table_mode,   // 1: table lookup mode, 0: direct mode
  // request from cell flow control
  input  logic               req,
  input  logic [LINK_W-1:0]  link,
  input  logic [EXT_W-1:0]   idx,
  input  logic               clp,
  output logic               busy,
  output logic               done,
  output decision_e          dec,
  // memory client port
  output logic               m_req,
  output logic               m_we,
  output logic [ADDR_W-1:0]  m_addr,
  output logic [MEM_W-1:0]   m_wdata,
  input  logic               m_done,
  input  logic [MEM_W-1:0]   m_rdata,
  // free-running time base
  output logic [TIME_W-1:0]  now
);

  typedef enum logic [2:0] {S_IDLE, S_LUT, S_RD, S_DEC, S_WR} state_e;
  state_e            state;
  logic              clp_q;
  logic [TIME_W-1:0] ta;
  conn_rec_t         rec_q, rec_new;
  decision_e         dec_new;

  vsa_core u_core (
    .ta      (ta),
    .clp     (clp_q),
    .rec_in  (rec_q),
    .dec     (dec_new),
    .rec_out (rec_new)
  );

  assign busy = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      now     <= '0;
      ta      <= '0;
      clp_q   <= 1'b0;
      rec_q   <= '0;
      done    <= 1'b0;
      dec     <= DEC_PASS;
      m_req   <= 1'b0;
      m_we    <= 1'b0;
      m_addr  <= '0;
      m_wdata <= '0;
    end else begin
      now  <= now + 1'b1;
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (req) begin
          ta     <= now;
          clp_q  <= clp;
          m_req  <= 1'b1;
          m_we   <= 1'b0;
          if (table_mode) begin
            m_addr <= lut_addr(link, idx);
            state  <= S_LUT;
          end else begin
            m_addr <= rec_addr_direct(link, idx);
            state  <= S_RD;
          end
        end
        S_LUT: if (m_done) begin
          m_addr <= rec_addr_table(m_rdata[EXT_W-1:0]);
          state  <= S_RD;
        end
        S_RD: if (m_done) begin
          m_req <= 1'b0;
          rec_q <= conn_rec_t'(m_rdata);
          state <= S_DEC;
        end
        S_DEC: begin
          dec     <= dec_new;
          m_wdata <= MEM_W'(rec_new);
          m_we    <= 1'b1;
          m_req   <= 1'b1;
          state   <= S_WR;
        end
        S_WR: if (m_done) begin
          m_req <= 1'b0;
          m_we  <= 1'b0;
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
