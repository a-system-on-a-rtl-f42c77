// tb_ddst_sopc - end-to-end test of the accelerator subsystem at its default
// sizes (1024-point FFT, 32-sample rows, 128-row N samples buffer).
//
// The testbench stands in for the processor: it drives the processor master
// port with single read/write transfers, the way the receiver software
// would, and models the external slave (off-chip memory) with random wait
// states. Sequence:
//   1. load twiddles (CosRam/SinRam), 1024 samples (DataRam1) and 117 rows of
//      received samples (N samples buffer);
//   2. start the FFT and the arithmetic mean together, poll both through the
//      slave ports; check Y against row means computed here;
//   3. read the FFT result from DataRam2 and compare with a double-precision
//      DFT;
//   4. start the norm unit on the FFT output (every magnitude to the N samples
//      buffer) while a second mean run reads other rows of the same buffer,
//      so the two masters compete for it; check magnitudes and both results;
//   5. norm in sum-only mode with stride 4, and on exact Pythagorean values;
//   6. processor accesses to the external slave.
// The CYCLES registers of steps 2 and 4 give the timings of the three
// accelerated operations at full size; they are printed and checked against
// each unit's cycle formula.
// Every mechanism is counted and must occur at least once: FFT ping-pong
// result in DataRam2, concurrent coprocessors, fabric contention, processor
// wait states, norm per-element and sum modes, stride, early square-root
// stop, external slave access.
module tb_ddst_sopc;
  import ddst_pkg::*;

  localparam int  N    = 1024;
  localparam int  L    = 10;
  localparam int  NP   = 117;
  localparam real PI   = 3.14159265358979323846;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  bus_req_t cpu_req, ext_req;
  bus_rsp_t cpu_rsp, ext_rsp;
  logic [2:0] busy, done;
  logic [NUM_SLAVES-1:0] contention;
  logic sqrt_exact;

  int checks = 0;
  int failures = 0;

  // mechanism counters
  int n_contention = 0, n_cpu_wait = 0, n_concurrent = 0, n_exact = 0;
  int n_ext_wait = 0, n_pingpong = 0, n_sum_mode = 0, n_each_mode = 0, n_stride = 0, n_ext = 0;

  always #5 clk = ~clk;

  ddst_sopc dut (.*);

  always_ff @(posedge clk) begin
    if (contention != 0) n_contention++;
    if (sqrt_exact) n_exact++;
    if ($countones(busy) > 1) n_concurrent++;
    if ((cpu_req.read || cpu_req.write) && cpu_rsp.waitrequest) n_cpu_wait++;
  end

  // ---------------------------------------------------- external slave model
  logic [31:0] ext_mem [256];
  logic ext_wait, ext_rv;
  logic [31:0] ext_rd;
  always_ff @(posedge clk) ext_wait <= ($urandom % 2 == 0);
  always_comb begin
    ext_rsp = '0;
    ext_rsp.waitrequest    = ext_wait;
    ext_rsp.readdatavalid  = ext_rv;
    ext_rsp.readdata[31:0] = ext_rd;
  end
  always_ff @(posedge clk) begin
    ext_rv <= 1'b0;
    if ((ext_req.read || ext_req.write) && ext_wait) n_ext_wait++;
    if (ext_req.read && !ext_wait) begin
      ext_rv <= 1'b1;
      ext_rd <= ext_mem[ext_req.address[7:0]];
    end
    if (ext_req.write && !ext_wait && ext_req.lane_en[0]) ext_mem[ext_req.address[7:0]] <= ext_req.writedata[31:0];
  end

  // ---------------------------------------------------- processor transfers
  task automatic bus_write(addr_t a, data_t d, lane_en_t en);
    @(negedge clk);
    cpu_req = '0;
    cpu_req.write = 1'b1;
    cpu_req.address = a;
    cpu_req.writedata = d;
    cpu_req.lane_en = en;
    while (1) begin
      @(posedge clk);
      if (!cpu_rsp.waitrequest) break;
    end
    @(negedge clk);
    cpu_req = '0;
  endtask

  task automatic bus_read(addr_t a, output data_t d);
    @(negedge clk);
    cpu_req = '0;
    cpu_req.read = 1'b1;
    cpu_req.address = a;
    while (1) begin
      @(posedge clk);
      if (!cpu_rsp.waitrequest) break;
    end
    @(negedge clk);
    cpu_req = '0;
    while (!cpu_rsp.readdatavalid) @(negedge clk);
    d = cpu_rsp.readdata;
  endtask

  task automatic reg_write(slave_e s, int off, int unsigned v);
    bus_write(make_addr(s, off), data_t'(v), lane_en_t'(1));
  endtask

  task automatic reg_read(slave_e s, int off, output logic [31:0] v);
    data_t d;
    bus_read(make_addr(s, off), d);
    v = d[31:0];
  endtask

  task automatic wait_done(slave_e s);
    logic [31:0] st;
    st = '0;
    while (!st[0]) reg_read(s, CSR_STATUS, st);
  endtask

  task automatic check(string what, logic cond);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  function automatic logic [31:0] isqrt(logic [63:0] v);
    logic [31:0] r;
    r = '0;
    for (int b = 31; b >= 0; b--) begin
      logic [63:0] t;
      t = {32'd0, r} | (64'd1 << b);
      if (t * t <= v) r = t[31:0];
    end
    return r;
  endfunction

  function automatic logic [31:0] mag(logic [63:0] w);
    longint re, im;
    re = longint'($signed(w[31:0]));
    im = longint'($signed(w[63:32]));
    return isqrt(64'(re * re) + 64'(im * im));
  endfunction

  // ---------------------------------------------------- test data
  logic [63:0]      x    [N];      // FFT input
  logic [63:0]      fres [N];      // FFT output read back
  logic [BUS_W-1:0] rows [128];    // N samples buffer contents as loaded

  task automatic check_means(int first, int np, int yrow);
    data_t y;
    logic [31:0] inv;
    inv = 32'((64'd1 << 32) / 64'(np));
    bus_read(make_addr(SL_YRAM, yrow), y);
    for (int l = 0; l < LANES; l++) begin
      longint sum, e;
      sum = 0;
      for (int r = first; r < first + np; r++) sum += longint'($signed(rows[r][l*32 +: 32]));
      e = (sum * longint'({32'd0, inv})) >>> 32;
      check($sformatf("Y row %0d lane %0d = %0d expected %0d", yrow, l, $signed(y[l*32 +: 32]), e),
            longint'($signed(y[l*32 +: 32])) == e);
    end
  endtask

  initial begin
    data_t d;
    logic [31:0] st, lo, hi, cyc;
    cpu_req = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // 1. load tables and data
    for (int k = 0; k < N / 2; k++) begin
      real c, s;
      c = $cos(2.0 * PI * k / N);
      s = $sin(2.0 * PI * k / N);
      bus_write(make_addr(SL_COSRAM, k), data_t'($rtoi(c * 1073741824.0 + (c >= 0 ? 0.5 : -0.5))), lane_en_t'(1));
      bus_write(make_addr(SL_SINRAM, k), data_t'($rtoi(s * 1073741824.0 + (s >= 0 ? 0.5 : -0.5))), lane_en_t'(1));
    end
    for (int i = 0; i < N; i++) begin
      int a, b;
      a = int'($urandom % (1 << 21)) - (1 << 20);
      b = int'($urandom % (1 << 21)) - (1 << 20);
      x[i] = {b[31:0], a[31:0]};
      bus_write(make_addr(SL_DATARAM1, i), data_t'(x[i]), lane_en_t'(2'b11));
    end
    for (int r = 0; r < 128; r++) begin
      for (int l = 0; l < LANES; l++) rows[r][l*32 +: 32] = int'($urandom % (1 << 25)) - (1 << 24);
      bus_write(make_addr(SL_NSAMPLES, r), rows[r], '1);
    end

    // 2. FFT and mean together
    reg_write(SL_FFT_CSR, 2, L);
    reg_write(SL_MEAN_CSR, 2, 32'(make_addr(SL_NSAMPLES, 0)));
    reg_write(SL_MEAN_CSR, 3, NP);
    reg_write(SL_MEAN_CSR, 4, 32'((64'd1 << 32) / 64'(NP)));
    reg_write(SL_MEAN_CSR, 5, 32'(make_addr(SL_YRAM, 0)));
    reg_write(SL_FFT_CSR, CSR_CTRL, 1);
    reg_write(SL_MEAN_CSR, CSR_CTRL, 1);
    wait_done(SL_MEAN_CSR);
    check_means(0, NP, 0);
    wait_done(SL_FFT_CSR);
    reg_read(SL_FFT_CSR, CSR_STATUS, st);
    if (st[2]) n_pingpong++;
    check("FFT result in DataRam2 for 1024 points", st[2]);
    // the two units use different memories, so neither waits for the other
    reg_read(SL_FFT_CSR, 3, cyc);
    $display("workload: 1024-point FFT in %0d cycles", cyc);
    check($sformatf("FFT cycles %0d expected 54273", cyc), cyc == 32'd54273);
    reg_read(SL_MEAN_CSR, 6, cyc);
    $display("workload: mean of %0d x 32 samples in %0d cycles", NP, cyc);
    check($sformatf("mean cycles %0d expected %0d", cyc, NP + 4), int'(cyc) == NP + 4);

    // 3. FFT result against a DFT
    begin
      int bad;
      bad = 0;
      for (int k = 0; k < N; k++) begin
        real sr, si, gr, gi;
        bus_read(make_addr(SL_DATARAM2, k), d);
        fres[k] = d[63:0];
        sr = 0.0; si = 0.0;
        for (int i = 0; i < N; i++) begin
          real c, s, xr, xi;
          int idx;
          idx = (i * k) % N;
          c = $cos(2.0 * PI * idx / N);
          s = $sin(2.0 * PI * idx / N);
          xr = real'($signed(x[i][31:0]));
          xi = real'($signed(x[i][63:32]));
          sr += xr * c + xi * s;
          si += xi * c - xr * s;
        end
        gr = real'($signed(fres[k][31:0]));
        gi = real'($signed(fres[k][63:32]));
        checks++;
        if ((gr - sr) > N || (sr - gr) > N || (gi - si) > N || (si - gi) > N) begin
          bad++;
          failures++;
          if (bad < 4) $display("FAIL FFT bin %0d got (%0f,%0f) expected (%0f,%0f)", k, gr, gi, sr, si);
        end
      end
    end

    // 4. norm of all FFT outputs into rows 0..31, mean over rows 40..99 at the same time
    reg_write(SL_NORM_CSR, 2, 32'(make_addr(SL_DATARAM2, 0)));
    reg_write(SL_NORM_CSR, 3, N);
    reg_write(SL_NORM_CSR, 4, 1);
    reg_write(SL_NORM_CSR, 5, 32'(make_addr(SL_NSAMPLES, 0)));
    reg_write(SL_NORM_CSR, 6, 0);
    reg_write(SL_MEAN_CSR, 2, 32'(make_addr(SL_NSAMPLES, 40)));
    reg_write(SL_MEAN_CSR, 3, 60);
    reg_write(SL_MEAN_CSR, 4, 32'((64'd1 << 32) / 64'd60));
    reg_write(SL_MEAN_CSR, 5, 32'(make_addr(SL_YRAM, 3)));
    reg_write(SL_NORM_CSR, CSR_CTRL, 1);
    repeat (200) @(negedge clk);
    reg_write(SL_MEAN_CSR, CSR_CTRL, 1);
    wait_done(SL_MEAN_CSR);
    check_means(40, 60, 3);
    wait_done(SL_NORM_CSR);
    n_each_mode++;
    begin
      logic [63:0] sum;
      sum = '0;
      for (int r = 0; r < N / LANES; r++) begin
        bus_read(make_addr(SL_NSAMPLES, r), d);
        for (int l = 0; l < LANES; l++) begin
          logic [31:0] e;
          e = mag(fres[r * LANES + l]);
          sum += 64'(e);
          check($sformatf("|X(%0d)| = %0d expected %0d", r * LANES + l, d[l*32 +: 32], e), d[l*32 +: 32] == e);
        end
      end
      reg_read(SL_NORM_CSR, 7, lo);
      reg_read(SL_NORM_CSR, 8, hi);
      check("norm sum register", {hi, lo} == sum);
      reg_read(SL_NORM_CSR, 9, cyc);
      $display("workload: norm of the 1024 FFT outputs in %0d cycles", cyc);
      // 5 + 6 cycles per element that needs all six root iterations, plus
      // the start cycle and the waits caused by the competing mean run
      check($sformatf("norm cycles %0d expected at least %0d", cyc, 11 * N + 1),
            cyc >= 32'(11 * N + 1) && cyc <= 32'(12 * N));
    end

    // 5a. sum-only mode, stride 4 (bins 0, 4, 8, ...)
    begin
      logic [63:0] sum;
      sum = '0;
      for (int k = 0; k < N; k += 4) sum += 64'(mag(fres[k]));
      reg_write(SL_NORM_CSR, 3, N / 4);
      reg_write(SL_NORM_CSR, 4, 4);
      reg_write(SL_NORM_CSR, 5, 32'(make_addr(SL_NSAMPLES, 100)));
      reg_write(SL_NORM_CSR, 6, 1);
      reg_write(SL_NORM_CSR, CSR_CTRL, 1);
      wait_done(SL_NORM_CSR);
      n_sum_mode++;
      n_stride++;
      bus_read(make_addr(SL_NSAMPLES, 100), d);
      check("strided sum written", d[63:0] == sum);
      check("other lanes of the row untouched", d[BUS_W-1:64] == rows[100][BUS_W-1:64]);
    end

    // 5b. exact roots stop the square root early
    for (int i = 0; i < 16; i++) begin
      int a, b;
      a = (3 * (i + 1)) << 18;
      b = (4 * (i + 1)) << 18;
      bus_write(make_addr(SL_DATARAM1, i), data_t'({b[31:0], a[31:0]}), lane_en_t'(2'b11));
    end
    reg_write(SL_NORM_CSR, 2, 32'(make_addr(SL_DATARAM1, 0)));
    reg_write(SL_NORM_CSR, 3, 16);
    reg_write(SL_NORM_CSR, 4, 1);
    reg_write(SL_NORM_CSR, 5, 32'(make_addr(SL_NSAMPLES, 120)));
    reg_write(SL_NORM_CSR, 6, 0);
    reg_write(SL_NORM_CSR, CSR_CTRL, 1);
    wait_done(SL_NORM_CSR);
    bus_read(make_addr(SL_NSAMPLES, 120), d);
    for (int i = 0; i < 16; i++)
      check($sformatf("exact magnitude %0d", i), d[i*32 +: 32] == 32'((5 * (i + 1)) << 18));

    // 6. external slave
    for (int i = 0; i < 8; i++) bus_write(make_addr(SL_EXT, i), data_t'(32'hA5A5_0000 + i), lane_en_t'(1));
    for (int i = 0; i < 8; i++) begin
      bus_read(make_addr(SL_EXT, i), d);
      n_ext++;
      check("external slave read back", d[31:0] == 32'hA5A5_0000 + i);
    end

    $display("mechanisms: pingpong=%0d concurrent=%0d contention=%0d cpu_wait=%0d each=%0d sum=%0d stride=%0d exact=%0d ext=%0d ext_wait=%0d",
             n_pingpong, n_concurrent, n_contention, n_cpu_wait, n_each_mode, n_sum_mode, n_stride, n_exact, n_ext, n_ext_wait);
    check("FFT ping-pong result seen", n_pingpong > 0);
    check("coprocessors ran concurrently", n_concurrent > 0);
    check("fabric contention seen", n_contention > 0);
    check("processor wait states seen", n_cpu_wait > 0);
    check("norm per-element mode run", n_each_mode > 0);
    check("norm sum-only mode run", n_sum_mode > 0);
    check("norm stride run", n_stride > 0);
    check("square root early stop seen", n_exact >= 16);
    check("external slave accessed", n_ext > 0 && n_ext_wait > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
