// tb_cwpp_corner_bc: end-to-end test of the wave-pipelined dot-product unit
// with the timing of a fast process corner.
//
// The fast corner is modelled by halving every delay of the default (slow
// corner) configuration: network D_min 1020 ps and D_max 1508 ps, so the
// skew D_max - D_min halves to 488 ps, and a strobe delay line of 600 ps plus
// 8 ps per tap. The test runs a full 1024-element vector at a 0.7 ns launch
// period (about 1.4 GHz) and checks result, throughput and latency; then it
// runs back-to-back vectors with bubbles, and sweeps every strobe delay
// setting at 0.45, 0.5, 0.7 and 1.0 ns, checking that the unit works exactly
// where the strobe edge of launch k+n falls inside the valid window of wave k:
//     D_max - n * t_launch <= D_strobe < D_min - (n - 1) * t_launch.
// Below 488 ps no setting works; at 0.5 ns (2 GHz) a narrow window exists,
// and at slower launch rates it widens. Mechanism counters as in the
// slow-corner test.
module tb_cwpp_corner_bc;
  import wp_pkg::*;
  timeunit 1ps;
  timeprecision 1ps;

  // Timing of the default configuration, as independent numbers.
  localparam int unsigned D_MIN = 1020;
  localparam int unsigned D_MAX = 1508;
  localparam int unsigned BASE  = 600;
  localparam int unsigned STEP  = 8;
  localparam int unsigned T_RUN = 700;
  localparam int unsigned NSEL  = 128;

  logic             clk = 1'b0;
  logic             rst_n = 1'b1;
  logic             vld = 1'b0;
  logic             sof = 1'b0;
  opvec_t           a = '0, b = '0;
  logic [6:0]       dly_sel = '0;
  logic             strobe_out;
  logic [ACC_W-1:0] acc;
  logic [CNT_W-1:0] elems;

  cwpp_dot_product #(
    .D_MIN_PS(D_MIN), .D_MAX_PS(D_MAX), .DLY_BASE_PS(BASE), .DLY_STEP_PS(STEP)
  ) dut (
    .clk_in(clk), .rst_n(rst_n), .vld(vld), .sof(sof), .a(a), .b(b),
    .dly_sel(dly_sel), .strobe_out(strobe_out), .acc(acc), .elems(elems)
  );

  int checks = 0;
  int failures = 0;
  // Mechanism counters.
  int n_in_flight = 0;     // waves captured after two or more later launches
  int n_bubble = 0;        // launches without data
  int n_restart = 0;       // vectors started
  int n_full_vec = 0;      // 1024-element vectors completed correctly
  int n_setup_viol = 0;    // sweep points failing because the strobe is early
  int n_hold_viol = 0;     // sweep points failing because the strobe is late
  int n_window_ok = 0;     // sweep points inside the window that worked
  int n_rate_limit = 0;    // sweep points at a launch period below D_max - D_min

  // Launch clock.
  int unsigned t_launch = T_RUN;
  bit          clk_run = 1'b0;
  int unsigned launches = 0;
  always begin
    if (clk_run) begin
      clk = 1'b1;
      launches++;
      #(t_launch / 2);
      clk = 1'b0;
      #(t_launch - t_launch / 2);
    end else begin
      #100;
    end
  end

  // Scoreboard.
  typedef struct {
    logic [ACC_W-1:0] acc;
    logic [CNT_W-1:0] elems;
    time              t;        // launch time
    int unsigned      launch;   // launch number
  } exp_t;
  exp_t             expq [$];
  longint unsigned  m_acc = 0;
  int unsigned      m_elems = 0;
  int               mism = 0;
  int               n_updates = 0;
  time              last_latency = 0;
  bit               quiet = 1'b0;

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // Drive one wave; it is launched on the next rising clk edge.
  task automatic drive_wave(bit v, bit s, opvec_t x, opvec_t y);
    int unsigned dot;
    int unsigned t_to_edge;
    @(negedge clk);
    t_to_edge = t_launch - t_launch / 2;
    vld = v;
    sof = s;
    a = x;
    b = y;
    if (v) begin
      dot = 0;
      for (int p = 0; p < int'(N_PAIRS); p++) dot += int'(x[p]) * int'(y[p]);
      if (s) begin
        m_acc = 64'(dot);
        m_elems = N_PAIRS;
        n_restart++;
      end else begin
        m_acc = (m_acc + 64'(dot)) % (64'd1 << ACC_W);
        m_elems += N_PAIRS;
      end
      expq.push_back('{acc: ACC_W'(m_acc), elems: CNT_W'(m_elems),
                       t: $time + time'(t_to_edge), launch: launches + 1});
    end else begin
      n_bubble++;
    end
  endtask

  function automatic opvec_t rand_vec();
    opvec_t r;
    for (int p = 0; p < int'(N_PAIRS); p++) r[p] = DATA_W'($urandom);
    return r;
  endfunction

  // Accumulator updates: one per strobe edge whose sampled wave is valid.
  always @(posedge strobe_out) begin
    logic taken;
    exp_t e;
    taken = dut.sampled.tag.vld;
    #1;
    if (taken && rst_n) begin
      n_updates++;
      if (expq.size() == 0) begin
        mism++;
      end else begin
        e = expq.pop_front();
        if (acc != e.acc || elems != e.elems) begin
          mism++;
          if (!quiet && mism < 5)
            $display("mismatch at %0t: acc=%0d exp=%0d elems=%0d exp=%0d", $time, acc, e.acc, elems, e.elems);
        end
        last_latency = $time - 1 - e.t;
        // Launches that followed this wave before the strobe edge that captured it.
        if (launches - e.launch >= 3) n_in_flight++;
      end
    end
  end

  task automatic drain();
    repeat ((D_MAX + BASE + NSEL * STEP) / t_launch + 4) drive_wave(1'b0, 1'b0, rand_vec(), rand_vec());
  endtask

  // Stop the clock, reset, set the delay and launch period, restart.
  task automatic restart(int unsigned period, int unsigned sel);
    @(negedge clk);
    clk_run = 1'b0;
    vld = 1'b0;
    #(D_MAX + BASE + NSEL * STEP + 2 * t_launch);
    rst_n = 1'b0;
    t_launch = period;
    dly_sel = 7'(sel);
    expq.delete();
    mism = 0;
    n_updates = 0;
    m_acc = 0;
    m_elems = 0;
    #(D_MAX + 100);
    rst_n = 1'b1;
    #100;
    clk_run = 1'b1;
    drain();
  endtask

  initial begin : watchdog
    #200_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned sel_ok, d_strobe, n_waves;
    time t_first, t_last;
    bit ok, predicted, tie;
    // The smallest setting at which the strobe is late enough at 1 ns.
    sel_ok = (D_MAX - T_RUN - BASE) / STEP + 1;
    d_strobe = BASE + sel_ok * STEP;
    #1000;
    clk_run = 1'b1;
    restart(T_RUN, sel_ok);

    // 1. One full 1024-element vector.
    n_waves = MAX_ELEMS / N_PAIRS;
    for (int w = 0; w < int'(n_waves); w++) drive_wave(1'b1, w == 0, rand_vec(), rand_vec());
    t_last = expq[$].t;
    drain();
    check(mism == 0 && expq.size() == 0, "full vector: every wave accumulated correctly");
    check(n_updates == int'(n_waves), "full vector: one accumulation per wave");
    check(elems == CNT_W'(MAX_ELEMS), "full vector: 1024 elements");
    check(acc == ACC_W'(m_acc), "full vector: dot product");
    check(last_latency == time'(64'(2 * T_RUN + d_strobe)), "latency launch + 2 t_launch + D_strobe");
    if (mism == 0 && elems == CNT_W'(MAX_ELEMS)) n_full_vec++;
    $display("full vector: acc=%0d, last wave launched at %0t, result %0t later",
             acc, t_last, last_latency);

    // 2. Back-to-back vectors of random length with bubbles.
    for (int v = 0; v < 20; v++) begin
      n_waves = 1 + $urandom_range(0, 127);
      for (int w = 0; w < int'(n_waves); w++) begin
        if ($urandom_range(0, 7) == 0) drive_wave(1'b0, 1'b1, rand_vec(), rand_vec());
        drive_wave(1'b1, w == 0, rand_vec(), rand_vec());
      end
    end
    drain();
    check(mism == 0 && expq.size() == 0, "back-to-back vectors with bubbles");

    // 3. Strobe delay sweep at three launch periods.
    quiet = 1'b1;
    foreach (sweep_periods[i]) begin
      int unsigned period;
      int n_pass;
      period = sweep_periods[i];
      n_pass = 0;
      for (int s = 0; s < int'(NSEL); s++) begin
        d_strobe = BASE + s * STEP;
        predicted = 1'b0;
        tie = 1'b0;
        for (int n = 0; n <= 3; n++) begin
          if (d_strobe + n * period > D_MAX && d_strobe + (n - 1) * period < D_MIN) predicted = 1'b1;
          if (d_strobe + n * period == D_MAX || d_strobe + (n - 1) * period == D_MIN) tie = 1'b1;
        end
        restart(period, s);
        for (int w = 0; w < 16; w++) drive_wave(1'b1, w == 0, rand_vec(), rand_vec());
        drain();
        ok = (mism == 0) && (expq.size() == 0);
        if (ok) n_pass++;
        if (!tie) begin
          check(ok == predicted, $sformatf("sweep T=%0d sel=%0d", period, s));
          if (ok && predicted) n_window_ok++;
          if (!ok && !predicted) begin
            if (D_MAX - D_MIN >= period) n_rate_limit++;
            else if (d_strobe + period < D_MAX) n_setup_viol++;
            else if (d_strobe >= D_MIN) n_hold_viol++;
          end
        end
      end
      $display("launch period %0d ps: %0d of %0d strobe settings work", period, n_pass, NSEL);
    end
    quiet = 1'b0;

    $display("mechanisms: in_flight=%0d bubbles=%0d restarts=%0d full_vectors=%0d window_ok=%0d setup_viol=%0d hold_viol=%0d rate_limit=%0d",
             n_in_flight, n_bubble, n_restart, n_full_vec, n_window_ok, n_setup_viol, n_hold_viol, n_rate_limit);
    check(n_in_flight > 0, "several waves in flight");
    check(n_bubble > 0, "bubble");
    check(n_restart > 1, "vector restart");
    check(n_full_vec > 0, "full 1024-element vector");
    check(n_window_ok > 0, "valid window hit");
    check(n_setup_viol > 0, "setup violation seen");
    check(n_hold_viol > 0, "hold violation seen");
    check(n_rate_limit > 0, "launch rate limit seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int unsigned sweep_periods [4] = '{450, 500, 700, 1000};

endmodule
