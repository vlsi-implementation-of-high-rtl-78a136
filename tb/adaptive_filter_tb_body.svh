// Body shared by the adaptive_filter testbenches. The including module
// declares localparam CONC (the CONCURRENT setting of its DUT) and the DUT
// with its signals, and its own watchdog; they are driven and checked here. A cycle-accurate software model of the
// two-stage filter (plain multiplication, same fixed-point rules) predicts
// in_ready, out_valid, y_out, e_out and every weight in every cycle.
//
// Phase 1 identifies an unknown 16-tap FIR system, d(n) = floor(sum h_k
// x(n-k) / 2^12) with random h in [-0.5, 0.5) and random 8-bit x; the mean
// |e| over the last 500 samples must fall below 3 and to a tenth of its value
// over the first 50, and the weights must end near h. Phase 2 resets the
// filter while it runs and then drives a full-scale desired response, so
// that the error and the weights saturate. Samples are offered at random,
// often back to back.

  localparam int N = 16, L = 8, W = 16, F = 12, DW = 16, MU = 6;
  localparam longint DMAX = (longint'(1) << (DW - 1)) - 1;
  localparam longint DMIN = -(longint'(1) << (DW - 1));
  localparam longint WMAX = (longint'(1) << (W - 1)) - 1;
  localparam longint WMIN = -(longint'(1) << (W - 1));
  localparam int N_LEARN = 3000, N_SAT = 300;

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_stall = 0, n_idle = 0, n_esat = 0, n_wsat = 0, n_pos = 0, n_neg = 0;
  int n_apc0 = 0, n_apc16 = 0, n_reset = 0, n_overlap = 0, n_b2b = 0;

  // Model state.
  longint m_taps [N], m_utaps [N], m_w [N];
  longint m_d, m_y, m_e, m_lute;
  bit     m_v1, m_v2;
  longint h [N], sys_taps [N];
  int     cycle = 0;

  function automatic longint sat(input longint v, input longint lo, input longint hi);
    return (v > hi) ? hi : (v < lo) ? lo : v;
  endfunction

  function automatic longint absl(input longint v);
    return v < 0 ? -v : v;
  endfunction

  task automatic model_reset();
    for (int k = 0; k < N; k++) begin m_taps[k] = 0; m_utaps[k] = 0; m_w[k] = 0; end
    m_d = 0; m_y = 0; m_e = 0; m_lute = 0; m_v1 = 0; m_v2 = 0;
  endtask

  // The model's view of one clock edge.
  task automatic model_edge(input bit acc_in, input longint xv, input longint dv);
    longint acc, ny, ne;
    ny = m_y; ne = m_e;
    if (m_v1) begin
      acc = 0;
      for (int k = 0; k < N; k++) acc += m_w[k] * m_taps[k];
      ny = sat(acc >>> F, DMIN, DMAX);
      ne = sat(m_d - ny, DMIN, DMAX);
      if (m_d - ny > DMAX || m_d - ny < DMIN) n_esat++;
    end
    if (m_v2) begin
      if (m_v1) n_overlap++;
      for (int k = 0; k < N; k++) begin
        longint mx, dl, nw;
        mx = absl(m_utaps[k]);
        if ((mx & 31) == 0)  n_apc0++;
        if ((mx & 31) == 16) n_apc16++;
        dl = (absl(m_lute) * mx) >> MU;
        if ((m_lute < 0) != (m_utaps[k] < 0)) dl = -dl;
        if (dl > 0) n_pos++;
        if (dl < 0) n_neg++;
        nw = m_w[k] + dl;
        if (nw > WMAX || nw < WMIN) n_wsat++;
        m_w[k] = sat(nw, WMIN, WMAX);
      end
    end
    if (m_v1) begin
      m_y = ny; m_e = ne; m_lute = ne;
      for (int k = 0; k < N; k++) m_utaps[k] = m_taps[k];
    end
    if (acc_in) begin
      for (int k = N - 1; k > 0; k--) m_taps[k] = m_taps[k-1];
      m_taps[0] = xv;
      m_d = dv;
    end
    m_v2 = m_v1;
    m_v1 = acc_in;
  endtask

  task automatic check_state(input string when);
    bit exp_ready;
    exp_ready = CONC ? 1'b1 : !(m_v1 || m_v2);
    checks += 2;
    if (in_ready != exp_ready || out_valid != m_v2) begin
      failures++;
      if (failures < 20) $display("FAIL %s cycle %0d in_ready=%b out_valid=%b expected %b %b",
                                  when, cycle, in_ready, out_valid, exp_ready, m_v2);
    end
    if (m_v2) begin
      checks++;
      if (longint'(y_out) != m_y || longint'(e_out) != m_e) begin
        failures++;
        if (failures < 20) $display("FAIL %s cycle %0d y=%0d e=%0d expected %0d %0d",
                                    when, cycle, y_out, e_out, m_y, m_e);
      end
    end
    for (int k = 0; k < N; k++) begin
      checks++;
      if (longint'(w_out[k]) != m_w[k]) begin
        failures++;
        if (failures < 20) $display("FAIL %s cycle %0d w[%0d]=%0d expected %0d",
                                    when, cycle, k, w_out[k], m_w[k]);
      end
    end
  endtask

  // Runs until `count` samples have been answered.
  // mode 0: system identification, mode 1: full-scale desired response.
  task automatic run(input int count, input int mode, output real first_err, output real last_err);
    int sent, done;
    bit accepted_last;
    longint xv, dv;
    first_err = 0.0; last_err = 0.0;
    sent = 0; done = 0; accepted_last = 0;
    while (done < count) begin
      @(negedge clk);
      cycle++;
      check_state("run");
      if (m_v2) begin
        if (done < 50) first_err += real'(absl(m_e));
        if (done >= count - 500) last_err += real'(absl(m_e));
        done++;
      end
      if (accepted_last) in_valid = 0;
      if (!in_valid && sent < count && $urandom_range(0, 9) < 7) begin
        xv = longint'($urandom_range(0, 255)) - 128;
        if (mode == 0) begin
          longint acc;
          for (int k = N - 1; k > 0; k--) sys_taps[k] = sys_taps[k-1];
          sys_taps[0] = xv;
          acc = 0;
          for (int k = 0; k < N; k++) acc += h[k] * sys_taps[k];
          dv = acc >>> F;
        end else begin
          dv = (sent % 2 == 0) ? DMAX : DMIN;
        end
        x_in = L'(xv);
        d_in = DW'(dv);
        in_valid = 1;
      end
      #1;
      if (in_valid && !in_ready) n_stall++;
      if (!in_valid) n_idle++;
      accepted_last = in_valid && in_ready;
      if (accepted_last) begin
        if (m_v1) n_b2b++;
        sent++;
      end
      model_edge(accepted_last, longint'(x_in), longint'(d_in));
    end
    @(negedge clk);
    in_valid = 0;
    repeat (3) begin
      #1;
      model_edge(1'b0, 0, 0);
      @(negedge clk);
      cycle++;
      check_state("drain");
    end
  endtask

  initial begin
    real e0, e1;
    in_valid = 0; x_in = '0; d_in = '0;
    model_reset();
    for (int k = 0; k < N; k++) begin
      sys_taps[k] = 0;
      h[k] = longint'($urandom_range(0, 4095)) - 2048;
    end
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    check_state("after reset");

    run(N_LEARN, 0, e0, e1);
    e0 = e0 / 50.0;
    e1 = e1 / 500.0;
    $display("mean |e|: first 50 samples %0.2f, last 500 samples %0.2f", e0, e1);
    checks++;
    if (!(e1 < 3.0 && e1 * 10.0 < e0)) begin
      failures++;
      $display("FAIL the filter did not converge");
    end
    checks++;
    for (int k = 0; k < N; k++)
      if (absl(m_w[k] - h[k]) > 64) begin
        failures++;
        $display("FAIL w[%0d]=%0d far from h=%0d", k, m_w[k], h[k]);
        break;
      end

    // Reset while running.
    @(negedge clk) rst_n = 0;
    @(negedge clk) rst_n = 1;
    n_reset++;
    model_reset();
    check_state("after second reset");

    run(N_SAT, 1, e0, e1);

    $display("mechanisms: overlap %0d back-to-back %0d stall %0d idle %0d e_sat %0d w_sat %0d step+ %0d step- %0d apc_x0 %0d apc_x16 %0d reset %0d",
             n_overlap, n_b2b, n_stall, n_idle, n_esat, n_wsat, n_pos, n_neg, n_apc0, n_apc16, n_reset);
    checks++;
    if (n_idle == 0 || n_esat == 0 || n_wsat == 0 || n_pos == 0 || n_neg == 0 ||
        n_apc0 == 0 || n_apc16 == 0 || n_reset == 0) begin
      failures++;
      $display("FAIL a mechanism never occurred");
    end
    checks++;
    if (CONC ? (n_overlap == 0 || n_b2b == 0 || n_stall != 0) : (n_stall == 0 || n_overlap != 0)) begin
      failures++;
      $display("FAIL overlap/stall counts do not fit CONCURRENT=%0d", CONC);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
