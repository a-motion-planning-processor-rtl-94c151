// tb_mpp_body.svh: shared body of the two end-to-end testbenches. The
// including module declares clk, rst_n, uart_rxd, uart_txd, the dut, and the
// localparams CPB (clocks per bit), N_OBS (obstacle boxes), N_CHECK
// (collision checks), N_BUILD (roadmap size), N_QUERY (path queries),
// COVER (1: count a failure for every mechanism that never happened) and
// WATCHDOG (cycles).
//
// Everything goes through the serial port, exactly as a host would use the
// processor. The reference is an exact separating-axis test of the rotated
// robot box against each obstacle box; answers within MARGIN length units of
// touching are not compared, since the fixed-point hardware may round
// either way there.

  localparam real MARGIN = 0.05;
  int checks = 0, failures = 0;
  byte unsigned rxq [$];
  real box_c [8][3], box_h [3];
  real rob_h [3] = '{24.0, 12.0, 12.0};

  always #5 clk = ~clk;

  // ---------------------------------------------------------------- serial
  task automatic send_byte(byte unsigned b, bit bad_stop = 0);
    uart_rxd = 0; repeat (CPB) @(posedge clk);
    for (int i = 0; i < 8; i++) begin uart_rxd = b[i]; repeat (CPB) @(posedge clk); end
    uart_rxd = !bad_stop; repeat (CPB) @(posedge clk);
    uart_rxd = 1;
  endtask
  task automatic send_tri(byte unsigned cmd, tri_t t);
    send_byte(cmd);
    for (int i = 35; i >= 0; i--) send_byte(t[i*8 +: 8]);
  endtask
  task automatic send_cfg(cfg_t c);
    logic [127:0] w;
    w = 128'(c);
    for (int i = 15; i >= 0; i--) send_byte(w[i*8 +: 8]);
  endtask

  // receiver: sample the middle of each bit
  initial forever begin
    byte unsigned b;
    @(negedge uart_txd);
    repeat (CPB / 2) @(posedge clk);
    for (int i = 0; i < 8; i++) begin repeat (CPB) @(posedge clk); b[i] = uart_txd; end
    repeat (CPB) @(posedge clk);
    if (uart_txd !== 1'b1) begin failures++; $display("FAIL stop bit from the processor"); end
    rxq.push_back(b);
  end
  task automatic get_byte(output byte unsigned b);
    while (rxq.size() == 0) @(posedge clk);
    b = rxq.pop_front();
  endtask
  task automatic get_cfg(output cfg_t c);
    logic [127:0] w;
    for (int i = 15; i >= 0; i--) begin
      byte unsigned b;
      get_byte(b);
      w[i*8 +: 8] = b;
    end
    c = cfg_t'(w[CFG_W-1:0]);
  endtask

  // ---------------------------------------------------------------- reference
  function automatic real min_sep(cfg_t q);
    real m, s;
    m = 1.0e30;
    for (int i = 0; i < N_OBS; i++) begin
      s = obb_sep(q, rob_h, box_c[i], box_h);
      if (s < m) m = s;
    end
    return m;
  endfunction
  function automatic cfg_t rnd_cfg();
    cfg_t c;
    c = '0;
    c.x = fx_t'($urandom_range(0, 240 << 16));
    c.y = fx_t'($urandom_range(0, 240 << 16));
    c.z = fx_t'($urandom_range(0, 240 << 16));
    c.a = 10'($urandom); c.b = 10'($urandom); c.c = 10'($urandom);
    return c;
  endfunction
  // line check with the hardware's intermediate points; 1 free, 0 hit,
  // -1 too close to call
  function automatic int line_ref(cfg_t a, cfg_t b);
    int r;
    r = 1;
    for (int s = 1; s < 8; s++) begin
      automatic real m = min_sep(point8(a, b, s));
      if (m < -MARGIN) return 0;
      if (m < MARGIN) r = -1;
    end
    return r;
  endfunction

  // ---------------------------------------------------------------- coverage
  int cov_fifo_full = 0, cov_cancel = 0, cov_node_rej = 0, cov_arb = 0;
  int cov_break = 0, cov_hit = 0, cov_free = 0, cov_found = 0, cov_lost = 0;
  int cov_edges = 0;
  always @(posedge clk) begin
    if (dut.u_cd.f_full) cov_fifo_full++;
    if (dut.u_cd.f_flush && dut.u_cd.tr_busy) cov_cancel++;
    if (dut.u_rb.u_gen.fr_valid && dut.u_rb.u_gen.fr_collide) cov_node_rej++;
    if ($countones(dut.u_rb.u_conn.u_arb.req_valid) > 1) cov_arb++;
    if (dut.u_rx.state.name() == "S_BREAK") cov_break++;
  end

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    box_tris_t bt;
    cfg_t ecfg_a [$], ecfg_b [$];
    byte unsigned b, hi;
    int n_nodes, n_edges;
    box_h = '{24.0, 24.0, 8.0};
    for (int i = 0; i < N_OBS; i++) begin
      box_c[i][0] = 40.0 + 70.0 * (i % 3) + 24.0;
      box_c[i][1] = 40.0 + 60.0 * ((i + 1) % 3) + 24.0;
      box_c[i][2] = 60.0 + 50.0 * (i % 2) + 8.0;
    end
    uart_rxd = 1;
    repeat (5) @(posedge clk); rst_n = 1;
    repeat (5) @(posedge clk);

    // a broken frame first: must be ignored
    send_byte(8'h00, 1);
    repeat (3 * CPB) @(posedge clk);

    // load the models
    send_byte(8'h03);
    bt = box_tris(-24 <<< 16, -12 <<< 16, -12 <<< 16, 48 << 16, 24 << 16, 24 << 16);
    foreach (bt[i]) send_tri(8'h02, bt[i]);
    for (int o = 0; o < N_OBS; o++) begin
      bt = box_tris(fx_t'($rtoi((box_c[o][0] - 24.0) * 65536.0)), fx_t'($rtoi((box_c[o][1] - 24.0) * 65536.0)),
                    fx_t'($rtoi((box_c[o][2] - 8.0) * 65536.0)), 48 << 16, 48 << 16, 16 << 16);
      foreach (bt[i]) send_tri(8'h01, bt[i]);
    end
    repeat (20) @(posedge clk);
    checks++;
    if (dut.u_cd.env_count != 12 * N_OBS || dut.u_cd.rob_count != 12) begin
      failures++; $display("FAIL loaded %0d obstacle and %0d robot triangles", dut.u_cd.env_count, dut.u_cd.rob_count);
    end

    // collision checks: half of them aimed at an obstacle
    for (int t = 0; t < N_CHECK; t++) begin
      cfg_t c;
      real m;
      c = rnd_cfg();
      if (t % 2 == 1) begin
        c.x = fx_t'($rtoi((box_c[t % N_OBS][0] + $urandom_range(0, 60) - 30.0) * 65536.0));
        c.y = fx_t'($rtoi((box_c[t % N_OBS][1] + $urandom_range(0, 60) - 30.0) * 65536.0));
        c.z = fx_t'($rtoi((box_c[t % N_OBS][2] + $urandom_range(0, 40) - 20.0) * 65536.0));
      end
      m = min_sep(c);
      send_byte(8'h05); send_cfg(c);
      get_byte(b);
      checks++;
      if (b != 8'h85) begin failures++; $display("FAIL check answer code %h", b); end
      get_byte(b);
      if (b == 1) cov_hit++; else cov_free++;
      if (m < -MARGIN || m > MARGIN) begin
        checks++;
        if ((b == 1) != (m < 0)) begin failures++; $display("FAIL check %0d: collide %0d separation %f", t, b, m); end
      end
    end

    // roadmap
    send_byte(8'h04); send_byte(8'(N_BUILD));
    get_byte(b);
    checks++;
    if (b != 8'h84) begin failures++; $display("FAIL build answer code %h", b); end
    get_byte(b); n_nodes = b;
    get_byte(hi); get_byte(b); n_edges = {hi, b};
    checks++;
    if (n_nodes != N_BUILD) begin failures++; $display("FAIL built %0d nodes", n_nodes); end
    for (int e = 0; e < n_edges; e++) begin
      cfg_t ca, cb;
      int r;
      get_cfg(ca); get_cfg(cb);
      ecfg_a.push_back(ca); ecfg_b.push_back(cb);
      checks++;
      if (min_sep(ca) < -MARGIN || min_sep(cb) < -MARGIN) begin failures++; $display("FAIL edge %0d has a colliding end", e); end
      r = line_ref(ca, cb);
      checks++;
      if (r == 0) begin failures++; $display("FAIL edge %0d passes through an obstacle", e); end
    end
    cov_edges = n_edges;
    $display("roadmap: %0d nodes, %0d edges (%0d tried), %0d node candidates rejected",
             n_nodes, n_edges, dut.u_rb.edges_tried, dut.u_rb.nodes_rejected);

    // path queries; the last one starts inside an obstacle
    for (int t = 0; t < N_QUERY; t++) begin
      cfg_t s, g, path [$];
      int found, len;
      path.delete();
      do s = rnd_cfg(); while (min_sep(s) < 1.0);
      do g = rnd_cfg(); while (min_sep(g) < 1.0);
      if (t == N_QUERY - 1) begin
        s = '0;
        s.x = fx_t'($rtoi(box_c[0][0] * 65536.0));
        s.y = fx_t'($rtoi(box_c[0][1] * 65536.0));
        s.z = fx_t'($rtoi(box_c[0][2] * 65536.0));
      end
      send_byte(8'h06); send_cfg(s); send_cfg(g);
      get_byte(b);
      checks++;
      if (b != 8'h86) begin failures++; $display("FAIL query answer code %h", b); end
      get_byte(b); found = b;
      get_byte(b); len = b;
      for (int i = 0; i < len; i++) begin
        cfg_t c;
        get_cfg(c);
        path.push_back(c);
      end
      if (found) begin
        cov_found++;
        checks++;
        if (len < 1) begin failures++; $display("FAIL query %0d found with empty path", t); end
        else begin
          checks++;
          if (t != N_QUERY - 1 && (line_ref(s, path[0]) == 0 || line_ref(g, path[len-1]) == 0)) begin
            failures++; $display("FAIL query %0d: blocked connection to the roadmap", t);
          end
          for (int i = 0; i + 1 < len; i++) begin
            automatic bit ok = 0;
            foreach (ecfg_a[e])
              if ((ecfg_a[e] == path[i] && ecfg_b[e] == path[i+1]) ||
                  (ecfg_b[e] == path[i] && ecfg_a[e] == path[i+1])) ok = 1;
            checks++;
            if (!ok) begin failures++; $display("FAIL query %0d step %0d is not a roadmap edge", t, i); end
          end
        end
      end else begin
        cov_lost++;
        checks++;
        if (len != 0) begin failures++; $display("FAIL query %0d not found but length %0d", t, len); end
      end
      $display("query %0d: found %0d, %0d nodes", t, found, len);
    end

    repeat (10) @(posedge clk);
    $display("mechanisms: fifo full %0d, early stop %0d, node rejected %0d, arbiter contention %0d, broken frame %0d,",
             cov_fifo_full, cov_cancel, cov_node_rej, cov_arb, cov_break);
    $display("            collide %0d, free %0d, edges %0d, edges rejected %0d, path found %0d, not found %0d",
             cov_hit, cov_free, cov_edges, dut.u_rb.edges_tried - 32'(cov_edges), cov_found, cov_lost);
    if (COVER) begin
      int cov [string];
      cov["fifo full (back-pressure)"] = cov_fifo_full;
      cov["early stop on first hit"] = cov_cancel;
      cov["node candidate rejected"] = cov_node_rej;
      cov["feasibility arbiter contention"] = cov_arb;
      cov["broken serial frame"] = cov_break;
      cov["collision answer"] = cov_hit;
      cov["free answer"] = cov_free;
      cov["roadmap edge kept"] = cov_edges;
      cov["roadmap edge rejected"] = int'(dut.u_rb.edges_tried) - cov_edges;
      cov["path found"] = cov_found;
      cov["path not found"] = cov_lost;
      foreach (cov[k]) begin
        checks++;
        if (cov[k] <= 0) begin failures++; $display("FAIL mechanism never happened: %s", k); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
