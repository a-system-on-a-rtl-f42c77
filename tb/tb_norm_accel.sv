// tb_norm_accel - self-checking test of the magnitude (norm) coprocessor.
//
// The testbench plays the processor (slave port) and the memories (master
// port): a complex source memory (DataRam2, lane 0 real, lane 1 imaginary) and
// the N samples buffer as destination, with one-cycle read latency and
// optional random wait states. References: floor(sqrt(re^2 + im^2)) computed
// bit by bit here, and the 64-bit sum of those values. Runs: every magnitude
// of 64 full-range elements; stride 4 over 16 elements (positions 0, 4, 8,
// ...) with wait states; sum-only mode, in which only the sum may be written;
// and Pythagorean pairs whose roots are exact, which must stop the square
// root early (after two iterations) and take 7 cycles each (CYCLES register).
module tb_norm_accel;
  import ddst_pkg::*;

  localparam int ROWS = 128;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  bus_req_t csr_req, m_req;
  bus_rsp_t csr_rsp, m_rsp;
  logic busy, done, sqrt_exact;

  int checks = 0;
  int failures = 0;
  int stalls = 0;
  int writes = 0;
  int exact_seen = 0;
  bit stall_en = 1'b0;

  always #5 clk = ~clk;

  norm_accel dut (.*);

  logic [63:0]      src [1024];
  logic [BUS_W-1:0] nbuf [ROWS];
  logic wr_stall, rv_q;
  logic [63:0] rd_q;

  always_ff @(posedge clk) wr_stall <= stall_en && ($urandom % 3 == 0);
  always_ff @(posedge clk) if (sqrt_exact) exact_seen++;

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
        if (addr_slave(m_req.address) == SL_DATARAM2) rd_q <= src[off % 1024];
        else begin failures++; $display("FAIL read outside the source memory"); end
      end
      if (m_req.write && !wr_stall) begin
        writes++;
        if (addr_slave(m_req.address) == SL_NSAMPLES) begin
          for (int l = 0; l < LANES; l++)
            if (m_req.lane_en[l]) nbuf[off % ROWS][l*32 +: 32] <= m_req.writedata[l*32 +: 32];
        end else begin failures++; $display("FAIL write outside the N samples buffer"); end
      end
    end
  end

  function automatic logic [31:0] ref_isqrt(logic [63:0] v);
    logic [31:0] r;
    r = '0;
    for (int b = 31; b >= 0; b--) begin
      logic [63:0] t;
      t = {32'd0, r} | (64'd1 << b);
      if (t * t <= v) r = t[31:0];
    end
    return r;
  endfunction

  function automatic logic [31:0] ref_mag(logic [63:0] w);
    longint re, im;
    re = longint'($signed(w[31:0]));
    im = longint'($signed(w[63:32]));
    return ref_isqrt(64'(re * re) + 64'(im * im));
  endfunction

  task automatic csr_write(int off, logic [31:0] d);
    @(negedge clk);
    csr_req = '0;
    csr_req.write = 1'b1;
    csr_req.address = make_addr(SL_NORM_CSR, off);
    csr_req.writedata[31:0] = d;
    @(negedge clk);
    csr_req = '0;
  endtask

  task automatic csr_read(int off, output logic [31:0] d);
    @(negedge clk);
    csr_req = '0;
    csr_req.read = 1'b1;
    csr_req.address = make_addr(SL_NORM_CSR, off);
    @(negedge clk);
    csr_req = '0;
    d = csr_rsp.readdata[31:0];
  endtask

  task automatic check(string what, logic cond);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  task automatic run_norm(int count, int stride, bit sum_mode, int dst_row, bit stall);
    logic [31:0] st, lo, hi;
    logic [63:0] sum;
    int w0;
    stall_en = stall;
    for (int r = 0; r < ROWS; r++) nbuf[r] = '0;
    csr_write(2, 32'(make_addr(SL_DATARAM2, 0)));
    csr_write(3, 32'(count));
    csr_write(4, 32'(stride));
    csr_write(5, 32'(make_addr(SL_NSAMPLES, dst_row)));
    csr_write(6, {31'd0, sum_mode});
    w0 = writes;
    csr_write(0, 32'd1);
    while (!done) @(negedge clk);
    csr_read(1, st);
    check("done and not busy", st[0] && !st[1]);
    sum = '0;
    for (int k = 0; k < count; k++) begin
      logic [31:0] e, g;
      e   = ref_mag(src[k * stride]);
      sum = sum + 64'(e);
      g   = nbuf[dst_row + k / 32][(k % 32) * 32 +: 32];
      if (!sum_mode) check($sformatf("|v(%0d)| = %0d expected %0d", k * stride, g, e), g == e);
    end
    csr_read(7, lo);
    csr_read(8, hi);
    check($sformatf("sum register %h expected %h", {hi, lo}, sum), {hi, lo} == sum);
    if (sum_mode) begin
      check("sum written to lanes 0-1", nbuf[dst_row][63:0] == sum);
      check("only the sum is written", writes - w0 == 1);
    end else begin
      check("one write per magnitude", writes - w0 == count);
    end
  endtask

  initial begin
    csr_req = '0;
    for (int i = 0; i < 1024; i++) src[i] = {$urandom, $urandom};
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run_norm(64, 1, 1'b0, 2, 1'b0);
    run_norm(16, 4, 1'b0, 5, 1'b1);
    run_norm(20, 1, 1'b1, 9, 1'b1);
    // exact roots with trailing zero bits: (3k, -4k) -> 5k, k a multiple of 2^16
    for (int i = 0; i < 8; i++) begin
      int a, b;
      a = (3 * (i + 1)) << 16;
      b = -((4 * (i + 1)) << 16);
      src[i] = {b[31:0], a[31:0]};
    end
    run_norm(8, 1, 1'b0, 0, 1'b0);
    begin
      logic [31:0] cyc;
      csr_read(9, cyc);
      // per element: read, data, root start, 1 + 2 iterations, write; plus start cycle
      check($sformatf("8 two-iteration elements in %0d cycles, expected 57", cyc), cyc == 32'd57);
    end
    for (int i = 0; i < 8; i++)
      check($sformatf("exact root %0d", i), nbuf[0][i*32 +: 32] == 32'((5 * (i + 1)) << 16));
    check("square root stopped early on exact roots", exact_seen >= 8);
    check("wait states were exercised", stalls > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
