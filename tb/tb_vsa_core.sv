// tb_vsa_core: checks the VSA decision against a reference written with
// 64-bit arithmetic on unwrapped times, first on hand-picked cases (late
// arrival, early within tolerance, too early, tagging, CLP=1 discard,
// counter-only mode, counter saturation), then on a random mix in which TAT
// stays within 2^30 of the arrival time.
module tb_vsa_core;
  import upc_pkg::*;

  logic [TIME_W-1:0] ta;
  logic              clp;
  conn_rec_t         rin, rout;
  decision_e         dec;
  int checks = 0, failures = 0;

  vsa_core dut (.ta(ta), .clp(clp), .rec_in(rin), .dec(dec), .rec_out(rout));

  task automatic run(longint unsigned t_arr, longint unsigned tat, longint unsigned tt,
                     longint unsigned tau, logic [E_W-1:0] e, logic c,
                     logic [CNT_W-1:0] cnt);
    decision_e  xd;
    longint unsigned xtat;
    logic [CNT_W-1:0] xcnt;
    logic       ce;
    ta = TIME_W'(t_arr); clp = c;
    rin = '{cnt: cnt, e: e, tau: TIME_W'(tau), t: TIME_W'(tt), tat: TIME_W'(tat)};
    #1;
    xtat = tat;
    if (e[E_CNT_ONLY])        xd = DEC_PASS;
    else if (t_arr >= tat)    begin xd = DEC_PASS; xtat = t_arr + tt; end
    else if (t_arr + tau >= tat) begin xd = DEC_PASS; xtat = tat + tt; end
    else if (!c && e[E_TAG])  xd = DEC_TAG;
    else                      xd = DEC_DISCARD;
    ce = (xd == DEC_PASS) ? e[E_CNT_PASS] : (xd == DEC_TAG) ? e[E_CNT_TAG] : e[E_CNT_DISC];
    xcnt = (ce && cnt != {CNT_W{1'b1}}) ? cnt + 1 : cnt;
    checks++;
    if (dec !== xd || rout.tat !== TIME_W'(xtat) || rout.cnt !== xcnt ||
        rout.t !== rin.t || rout.tau !== rin.tau || rout.e !== rin.e) begin
      failures++;
      $display("FAIL ta=%0d tat=%0d T=%0d tau=%0d e=%h clp=%b: dec=%s tat'=%0d cnt=%0d exp %s %0d %0d",
               t_arr, tat, tt, tau, e, c, dec.name(), rout.tat, rout.cnt, xd.name(), xtat, xcnt);
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
    logic [E_W-1:0] e_all;
    e_all = 8'h0F;   // tag, count everything
    run(1000, 900, 100, 10, e_all, 0, 5);    // late: new TAT = ta + T
    run(1000, 1000, 100, 10, e_all, 0, 5);   // exactly on time
    run(1000, 1010, 100, 10, e_all, 0, 5);   // early, inside tolerance
    run(1000, 1011, 100, 10, e_all, 0, 5);   // too early: tag
    run(1000, 1011, 100, 10, e_all, 1, 5);   // too early with CLP=1: discard
    run(1000, 1011, 100, 10, 8'h0E, 0, 5);   // tagging off: discard
    run(1000, 5000, 100, 10, 8'h12, 0, 5);   // counter-only: pass, TAT kept
    run(1000, 900, 100, 10, e_all, 0, {CNT_W{1'b1}});   // counter saturates
    run(1000, 900, 100, 10, 8'h0D, 0, 5);    // passed cells not counted
    run(32'hFFFF_FFF0, 32'hFFFF_FFF8, 32, 16, e_all, 0, 0); // across wrap (reference wraps too)
    for (int i = 0; i < 5000; i++) begin
      longint unsigned t0, tat;
      t0  = 64'(1 << 30) + 64'($urandom_range(0, 1 << 20));
      tat = t0 - 64'(1 << 19) + 64'($urandom_range(0, 1 << 20));
      run(t0, tat, $urandom_range(0, 1 << 16), $urandom_range(0, 1 << 19),
          E_W'($urandom), 1'($urandom), CNT_W'({$urandom, $urandom}));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
