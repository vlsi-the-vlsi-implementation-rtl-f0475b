// vsa_core: one-cell decision of the Virtual Scheduling Algorithm (VSA).
//
// For a cell arriving at time ta on a connection with theoretical arrival
// time TAT, cell interval T and tolerance tau:
//   ta >= TAT          conforming, new TAT = ta + T
//   TAT - tau <= ta    conforming, new TAT = TAT + T
//   otherwise          non-conforming, TAT unchanged
// The document uses a priority encoder so that the algorithm runs in
// parallel rather than sequentially; here all comparisons are evaluated at
// once and a priority select picks the result, so the decision is a single
// combinational step.
//
// Cell loss priority: a non-conforming CLP=0 cell is tagged (CLP set to 1)
// when bit E_TAG of E is set, otherwise discarded; a non-conforming CLP=1
// cell is always discarded. Tagging as the action for the high-priority
// cells follows the document's aim of keeping CLP=0 cell loss low; the exact
// rule is this design's choice. In counter-only mode (E_CNT_ONLY) every cell
// passes and TAT is left alone. The counter increments, saturating, when the
// cell's decision is enabled for counting in E.
//
// Times are modulo 2^TIME_W and compared through signed differences, so a
// connection must see a cell at least every 2^(TIME_W-1) ticks for the
// comparison to stay correct. Purely combinational.
module vsa_core
  import upc_pkg::*;
(
  input  logic [TIME_W-1:0] ta,       // arrival time of the cell
  input  logic              clp,      // CLP bit of the arriving cell
  input  conn_rec_t         rec_in,   // stored connection record
  output decision_e         dec,      // pass, tag or discard
  output conn_rec_t         rec_out   // record to write back
);

  logic signed [TIME_W-1:0] late;     // ta - TAT
  logic        [TIME_W-1:0] early;    // TAT - ta
  logic                     c_late, c_early;
  logic                     cnt_en;

  always_comb begin
    late    = signed'(ta - rec_in.tat);
    early   = rec_in.tat - ta;
    // parallel comparisons; c_early only matters when c_late is false, and
    // then TAT - ta is positive
    c_late  = (late >= 0);
    c_early = (early <= rec_in.tau);

    rec_out = rec_in;
    // priority select of the new TAT and decision
    if (rec_in.e[E_CNT_ONLY]) begin
      dec = DEC_PASS;
    end else if (c_late) begin
      dec = DEC_PASS;
      rec_out.tat = ta + rec_in.t;
    end else if (c_early) begin
      dec = DEC_PASS;
      rec_out.tat = rec_in.tat + rec_in.t;
    end else if (!clp && rec_in.e[E_TAG]) begin
      dec = DEC_TAG;
    end else begin
      dec = DEC_DISCARD;
    end

    unique case (dec)
      DEC_PASS:    cnt_en = rec_in.e[E_CNT_PASS];
      DEC_TAG:     cnt_en = rec_in.e[E_CNT_TAG];
      DEC_DISCARD: cnt_en = rec_in.e[E_CNT_DISC];
      default:     cnt_en = 1'b0;
    endcase
    if (cnt_en && (rec_in.cnt != '1)) rec_out.cnt = rec_in.cnt + 1'b1;
  end

endmodule
