// tb_avalon_fabric - self-checking test of the switch fabric.
//
// Four masters issue random reads and writes to three slave models. Each
// master writes only its own address window, and keeps a shadow of it, so
// every read it gets back can be checked no matter how the transfers of the
// masters interleave. Slaves 0 and 1 answer without wait states; slave 2
// inserts random wait states. Checks: read data, that every request is
// accepted within a bounded time (no master starves under round robin),
// that transfers to different slaves happen in the same cycle (nonblocking
// fabric), and that competing requests for one slave were seen.
module tb_avalon_fabric;
  import ddst_pkg::*;

  localparam int NM = 4;
  localparam int NS = 3;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  bus_req_t m_req [NM];
  bus_rsp_t m_rsp [NM];
  bus_req_t s_req [NS];
  bus_rsp_t s_rsp [NS];
  logic [NS-1:0] contention;

  int checks = 0;
  int failures = 0;
  int parallel_cycles = 0;
  int contention_cycles = 0;
  int finished = 0;

  always #5 clk = ~clk;

  avalon_fabric #(.NM(NM), .NS(NS)) dut (.*);

  // ---------------------------------------------------------- slave models
  logic [31:0] smem [NS][64];
  logic [NS-1:0] swait;
  logic [NS-1:0] srv;
  logic [31:0]   srd [NS];

  always_ff @(posedge clk) swait <= {($urandom % 2 == 0), 2'b00};

  always_comb
    for (int s = 0; s < NS; s++) begin
      s_rsp[s] = '0;
      s_rsp[s].waitrequest   = swait[s];
      s_rsp[s].readdatavalid = srv[s];
      s_rsp[s].readdata[31:0] = srd[s];
    end

  always_ff @(posedge clk) begin
    int acc;
    acc = 0;
    for (int s = 0; s < NS; s++) begin
      srv[s] <= 1'b0;
      if (s_req[s].read && !swait[s]) begin
        srv[s] <= 1'b1;
        srd[s] <= smem[s][s_req[s].address[5:0]];
      end
      if (s_req[s].write && !swait[s] && s_req[s].lane_en[0])
        smem[s][s_req[s].address[5:0]] <= s_req[s].writedata[31:0];
      if ((s_req[s].read || s_req[s].write) && !swait[s]) acc++;
    end
    if (acc > 1) parallel_cycles++;
    if (contention != 0) contention_cycles++;
  end

  task automatic check(string what, logic cond);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  // ---------------------------------------------------------- masters
  for (genvar m = 0; m < NM; m++) begin : g_m
    logic [31:0] shadow [NS][16];
    initial begin
      m_req[m] = '0;
      for (int s = 0; s < NS; s++) for (int i = 0; i < 16; i++) shadow[s][i] = '0;
      wait (rst_n);
      // clear own window
      for (int s = 0; s < NS; s++)
        for (int i = 0; i < 16; i++) begin
          @(negedge clk);
          m_req[m] = '0;
          m_req[m].write = 1'b1;
          m_req[m].address = {SEL_W'(s), OFF_W'(m * 16 + i)};
          m_req[m].lane_en = 1;
          while (1) begin
            @(posedge clk);
            if (!m_rsp[m].waitrequest) break;
          end
        end
      for (int t = 0; t < 300; t++) begin
        int s, i, wait_cyc;
        logic is_rd;
        s = $urandom % NS;
        i = $urandom % 16;
        is_rd = $urandom % 2;
        @(negedge clk);
        m_req[m] = '0;
        m_req[m].address = {SEL_W'(s), OFF_W'(m * 16 + i)};
        m_req[m].lane_en = 1;
        if (is_rd) m_req[m].read = 1'b1;
        else begin
          m_req[m].write = 1'b1;
          m_req[m].writedata[31:0] = $urandom;
          shadow[s][i] = m_req[m].writedata[31:0];
        end
        wait_cyc = 0;
        while (1) begin
          @(posedge clk);
          if (!m_rsp[m].waitrequest) break;
          wait_cyc++;
        end
        check($sformatf("master %0d accepted after %0d waits", m, wait_cyc), wait_cyc < 40);
        @(negedge clk);
        m_req[m] = '0;
        if (is_rd) begin
          wait_cyc = 0;
          while (!m_rsp[m].readdatavalid && wait_cyc < 50) begin
            @(negedge clk);
            wait_cyc++;
          end
          check($sformatf("master %0d got its read data", m), m_rsp[m].readdatavalid);
          check($sformatf("master %0d read slave %0d word %0d = %h expected %h", m, s, i,
                          m_rsp[m].readdata[31:0], shadow[s][i]),
                m_rsp[m].readdata[31:0] == shadow[s][i]);
        end
      end
      finished++;
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    wait (finished == NM);
    check($sformatf("transfers to different slaves in one cycle (%0d)", parallel_cycles), parallel_cycles > 0);
    check($sformatf("competing requests for one slave (%0d)", contention_cycles), contention_cycles > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
