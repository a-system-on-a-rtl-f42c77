// tb_fft_accel - self-checking test of the FFT coprocessor.
//
// The testbench plays both the processor (register accesses on the slave
// port) and the memories (DataRam1/2, CosRam, SinRam behind the master port,
// one-cycle read latency, optional random wait states). Each transform's
// output is compared with a double-precision DFT computed here, with a
// tolerance of 2^LOG2N LSBs for the fixed-point rounding. Runs: 16 points
// with wait states, 8 points (odd LOG2N, result in DataRam1), and 1024 points
// without wait states, whose cycle count must equal 3N + 10(N/2)LOG2N + 1 and stay
// within the 56,743 cycles reported for the original 1024-point unit.
// A last pair of runs covers the way one large transform serves a smaller
// size: 512 samples zero-padded to 1024 points, whose even bins must match a
// separate 512-point run of the unit on the same samples.
module tb_fft_accel;
  import ddst_pkg::*;

  localparam int MAXL = 10;
  localparam int MAXN = 1 << MAXL;
  localparam real PI = 3.14159265358979323846;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  bus_req_t csr_req, m_req;
  bus_rsp_t csr_rsp, m_rsp;
  logic busy, done;

  int checks = 0;
  int failures = 0;
  int stalls = 0;
  bit stall_en = 1'b0;

  always #5 clk = ~clk;

  fft_accel #(.MAX_LOG2N(MAXL)) dut (.*);

  // ------------------------------------------------------ memory model
  logic [63:0] ram1 [MAXN];
  logic [63:0] ram2 [MAXN];
  logic [31:0] cosr [MAXN/2];
  logic [31:0] sinr [MAXN/2];
  logic        wr_stall;
  logic        rv_q;
  logic [63:0] rd_q;

  always_ff @(posedge clk) wr_stall <= stall_en && ($urandom % 4 == 0);

  always_comb begin
    m_rsp = '0;
    m_rsp.waitrequest   = wr_stall;
    m_rsp.readdatavalid = rv_q;
    m_rsp.readdata[63:0] = rd_q;
  end

  always @(posedge clk) begin
    int off;
    rv_q <= 1'b0;
    off  = int'(m_req.address[OFF_W-1:0]);
    if (rst_n) begin
      if ((m_req.read || m_req.write) && wr_stall) stalls++;
      if (m_req.read && !wr_stall) begin
        rv_q <= 1'b1;
        unique case (addr_slave(m_req.address))
          SL_DATARAM1: rd_q <= ram1[off];
          SL_DATARAM2: rd_q <= ram2[off];
          SL_COSRAM:   rd_q <= {32'd0, cosr[off]};
          SL_SINRAM:   rd_q <= {32'd0, sinr[off]};
          default: begin rd_q <= '0; failures++; $display("FAIL read from slave %0d", addr_slave(m_req.address)); end
        endcase
      end
      if (m_req.write && !wr_stall) begin
        if (m_req.lane_en[1:0] != 2'b11) begin failures++; $display("FAIL partial complex write"); end
        unique case (addr_slave(m_req.address))
          SL_DATARAM1: ram1[off] <= m_req.writedata[63:0];
          SL_DATARAM2: ram2[off] <= m_req.writedata[63:0];
          default: begin failures++; $display("FAIL write to slave %0d", addr_slave(m_req.address)); end
        endcase
      end
    end
  end

  // ------------------------------------------------------ processor side
  task automatic csr_write(int off, logic [31:0] d);
    @(negedge clk);
    csr_req = '0;
    csr_req.write = 1'b1;
    csr_req.address = make_addr(SL_FFT_CSR, off);
    csr_req.writedata[31:0] = d;
    csr_req.lane_en = 1;
    @(negedge clk);
    csr_req = '0;
  endtask

  task automatic csr_read(int off, output logic [31:0] d);
    @(negedge clk);
    csr_req = '0;
    csr_req.read = 1'b1;
    csr_req.address = make_addr(SL_FFT_CSR, off);
    @(negedge clk);
    csr_req = '0;
    d = csr_rsp.readdata[31:0];
    if (!csr_rsp.readdatavalid) begin failures++; $display("FAIL csr read not valid"); end
  endtask

  task automatic check(string what, logic cond);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  logic [63:0] half_src [MAXN/2];
  logic [63:0] even_bins [MAXN/2];

  // half: the second half of the input is zero; reuse: load half_src instead
  // of fresh random samples
  task automatic run_fft(int l, bit stall, bit half = 1'b0, bit reuse = 1'b0);
    int n;
    real xr [MAXN];
    real xi [MAXN];
    int  t0, t1;
    logic [31:0] st, cyc;
    int bad;
    n = 1 << l;
    stall_en = stall;
    for (int i = 0; i < n; i++) begin
      int a, b;
      a = int'($urandom % (1 << 21)) - (1 << 20);
      b = int'($urandom % (1 << 21)) - (1 << 20);
      if (half && i >= n / 2) begin a = 0; b = 0; end
      ram1[i] = {b[31:0], a[31:0]};
      if (reuse) begin
        a = $signed(half_src[i][31:0]);
        b = $signed(half_src[i][63:32]);
        ram1[i] = half_src[i];
      end else if (half && i < n / 2) half_src[i] = ram1[i];
      xr[i] = real'(a);
      xi[i] = real'(b);
      ram2[i] = '0;
    end
    csr_write(2, 32'(l));
    csr_write(0, 32'd1);
    t0 = $time;
    csr_read(1, st);
    check("busy after start", st[1]);
    while (!done) @(negedge clk);
    t1 = $time;
    csr_read(1, st);
    check("done flag", st[0] && !st[1]);
    check("result location flag", st[2] == (l % 2 == 0));
    csr_read(3, cyc);
    if (!stall) begin
      int expect_cyc;
      expect_cyc = 3 * n + 10 * (n / 2) * l + 1;
      check($sformatf("cycle count %0d expected %0d", cyc, expect_cyc), int'(cyc) == expect_cyc);
      if (l == 10) check($sformatf("1024 points within 56743 cycles (%0d)", cyc), cyc <= 32'd56743);
    end
    bad = 0;
    for (int k = 0; k < n; k++) begin
      real sr, si, gr, gi;
      logic [63:0] w;
      sr = 0.0; si = 0.0;
      for (int i = 0; i < n; i++) begin
        int idx;
        real c, s;
        idx = (i * k) % n;
        c = $cos(2.0 * PI * idx / n);
        s = $sin(2.0 * PI * idx / n);
        sr += xr[i] * c + xi[i] * s;
        si += xi[i] * c - xr[i] * s;
      end
      w  = (l % 2 == 0) ? ram2[k] : ram1[k];
      gr = real'($signed(w[31:0]));
      gi = real'($signed(w[63:32]));
      checks++;
      if ((gr - sr) > real'(n) || (sr - gr) > real'(n) || (gi - si) > real'(n) || (si - gi) > real'(n)) begin
        bad++;
        failures++;
        if (bad < 5) $display("FAIL N=%0d bin %0d got (%0f,%0f) expected (%0f,%0f)", n, k, gr, gi, sr, si);
      end
    end
    $display("N=%0d done in %0d cycles, %0d bins wrong", n, cyc, bad);
  endtask

  initial begin
    csr_req = '0;
    for (int k = 0; k < MAXN / 2; k++) begin
      cosr[k] = 32'($rtoi($cos(2.0 * PI * k / MAXN) * 1073741824.0 + ($cos(2.0 * PI * k / MAXN) >= 0 ? 0.5 : -0.5)));
      sinr[k] = 32'($rtoi($sin(2.0 * PI * k / MAXN) * 1073741824.0 + ($sin(2.0 * PI * k / MAXN) >= 0 ? 0.5 : -0.5)));
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run_fft(4, 1'b1);
    run_fft(3, 1'b0);
    run_fft(10, 1'b0);
    run_fft(10, 1'b0, 1'b1);
    for (int m = 0; m < MAXN / 2; m++) even_bins[m] = ram2[2 * m];
    run_fft(9, 1'b0, 1'b0, 1'b1);
    for (int m = 0; m < MAXN / 2; m++) begin
      longint dr, di;
      dr = longint'($signed(ram1[m][31:0]))  - longint'($signed(even_bins[m][31:0]));
      di = longint'($signed(ram1[m][63:32])) - longint'($signed(even_bins[m][63:32]));
      check($sformatf("512-point bin %0d equals bin %0d of the padded 1024-point run", m, 2 * m),
            dr <= 2048 && dr >= -2048 && di <= 2048 && di >= -2048);
    end
    check("wait states were exercised", stalls > 0);
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
