// tb_mean_accel - self-checking test of the arithmetic mean coprocessor.
//
// The testbench plays the processor (slave port) and the N samples buffer
// and Y memories (master port; one-cycle read latency, optional random wait
// states). For each run it fills Np rows of P = 32 samples, programs
// SRC/NP/INV_NP/DST, starts the unit and compares every element of Y with
// the row mean of the reshaped P x Np matrix computed here: exactly against
// floor(sum * floor(2^32/Np) / 2^32), and within one LSB of the real mean.
// Runs: Np = 4 with wait states, Np = 117 (3744 samples) without, whose
// cycle count must be Np + 4, and Np = 2.
module tb_mean_accel;
  import ddst_pkg::*;

  localparam int P = 32;
  localparam int ROWS = 128;

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

  mean_accel #(.P(P)) dut (.*);

  logic [BUS_W-1:0] nbuf [ROWS];
  logic [BUS_W-1:0] yram [8];
  logic wr_stall, rv_q;
  logic [BUS_W-1:0] rd_q;

  always_ff @(posedge clk) wr_stall <= stall_en && ($urandom % 3 == 0);

  always_comb begin
    m_rsp = '0;
    m_rsp.waitrequest   = wr_stall;
    m_rsp.readdatavalid = rv_q;
    m_rsp.readdata      = rd_q;
  end

  always @(posedge clk) begin
    int off;
    rv_q <= 1'b0;
    off  = int'(m_req.address[OFF_W-1:0]);
    if (rst_n) begin
      if ((m_req.read || m_req.write) && wr_stall) stalls++;
      if (m_req.read && !wr_stall) begin
        rv_q <= 1'b1;
        if (addr_slave(m_req.address) == SL_NSAMPLES) rd_q <= nbuf[off % ROWS];
        else begin failures++; $display("FAIL read outside the N samples buffer"); end
      end
      if (m_req.write && !wr_stall) begin
        if (addr_slave(m_req.address) == SL_YRAM) begin
          for (int l = 0; l < LANES; l++)
            if (m_req.lane_en[l]) yram[off % 8][l*32 +: 32] <= m_req.writedata[l*32 +: 32];
        end else begin failures++; $display("FAIL write outside Y"); end
      end
    end
  end

  task automatic csr_write(int off, logic [31:0] d);
    @(negedge clk);
    csr_req = '0;
    csr_req.write = 1'b1;
    csr_req.address = make_addr(SL_MEAN_CSR, off);
    csr_req.writedata[31:0] = d;
    @(negedge clk);
    csr_req = '0;
  endtask

  task automatic csr_read(int off, output logic [31:0] d);
    @(negedge clk);
    csr_req = '0;
    csr_req.read = 1'b1;
    csr_req.address = make_addr(SL_MEAN_CSR, off);
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

  task automatic run_mean(int np, int src_row, int dst_row, bit stall);
    logic [31:0] inv, st, cyc;
    stall_en = stall;
    for (int r = 0; r < np; r++)
      for (int l = 0; l < P; l++) begin
        int v;
        v = int'($urandom % (1 << 25)) - (1 << 24);
        nbuf[(src_row + r) % ROWS][l*32 +: 32] = v;
      end
    yram[dst_row] = '0;
    inv = 32'((64'd1 << 32) / 64'(np));
    csr_write(2, 32'(make_addr(SL_NSAMPLES, src_row)));
    csr_write(3, 32'(np));
    csr_write(4, inv);
    csr_write(5, 32'(make_addr(SL_YRAM, dst_row)));
    csr_write(0, 32'd1);
    while (!done) @(negedge clk);
    csr_read(1, st);
    check("done and not busy", st[0] && !st[1]);
    csr_read(6, cyc);
    if (!stall) check($sformatf("Np=%0d cycles %0d expected %0d", np, cyc, np + 4), int'(cyc) == np + 4);
    for (int l = 0; l < P; l++) begin
      longint sum, exp_fl;
      real avg;
      int got;
      sum = 0;
      for (int r = 0; r < np; r++) sum += longint'($signed(nbuf[(src_row + r) % ROWS][l*32 +: 32]));
      avg    = real'(sum) / real'(np);
      exp_fl = (sum * longint'({32'd0, inv})) >>> 32;
      got    = $signed(yram[dst_row][l*32 +: 32]);
      check($sformatf("Np=%0d Y[%0d]=%0d expected %0d", np, l, got, exp_fl), longint'(got) == exp_fl);
      check($sformatf("Np=%0d Y[%0d]=%0d near mean %f", np, l, got, avg),
            real'(got) - avg <= 1.0 && avg - real'(got) <= 1.0);
    end
    $display("Np=%0d done in %0d cycles", np, cyc);
  endtask

  initial begin
    csr_req = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run_mean(4, 3, 1, 1'b1);
    run_mean(117, 0, 0, 1'b0);
    run_mean(2, 120, 7, 1'b1);
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
