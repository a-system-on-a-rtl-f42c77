// tb_onchip_ram - self-checking test of the dedicated on-chip memory.
//
// Two instances are tested: a complex-word memory (2 lanes, like DataRam1)
// and a wide-row memory (32 lanes, like the N samples buffer). A shadow
// array in the testbench records every write, honouring the lane enables;
// every read must return the shadow contents exactly one cycle after the
// request, and the port must never assert waitrequest.
module tb_onchip_ram;
  import ddst_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  bus_req_t req_a, req_b;
  bus_rsp_t rsp_a, rsp_b;

  int checks = 0;
  int failures = 0;

  always #5 clk = ~clk;

  onchip_ram #(.DEPTH(64), .NLANES(2))     dut_a (.clk, .rst_n, .req(req_a), .rsp(rsp_a));
  onchip_ram #(.DEPTH(16), .NLANES(LANES)) dut_b (.clk, .rst_n, .req(req_b), .rsp(rsp_b));

  logic [63:0]    sh_a [64];
  logic [BUS_W-1:0] sh_b [16];

  task automatic check(string what, logic cond);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  initial begin
    req_a = '0;
    req_b = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // fill both memories completely
    for (int i = 0; i < 64; i++) begin
      req_a = '0;
      req_a.write = 1'b1;
      req_a.address = make_addr(SL_DATARAM1, i);
      req_a.lane_en = '1;
      req_a.writedata[63:0] = {$urandom, $urandom};
      sh_a[i] = req_a.writedata[63:0];
      if (i < 16) begin
        req_b = '0;
        req_b.write = 1'b1;
        req_b.address = make_addr(SL_NSAMPLES, i);
        req_b.lane_en = '1;
        for (int l = 0; l < LANES; l++) req_b.writedata[l*32 +: 32] = $urandom;
        sh_b[i] = req_b.writedata;
      end else req_b = '0;
      check("no wait state on write", !rsp_a.waitrequest && !rsp_b.waitrequest);
      @(negedge clk);
    end
    // random traffic: partial-lane writes and reads
    req_a = '0;
    req_b = '0;
    for (int t = 0; t < 600; t++) begin
      int ia, ib;
      logic rd_a, rd_b;
      logic [63:0] exp_a;
      logic [BUS_W-1:0] exp_b;
      ia = $urandom % 64;
      ib = $urandom % 16;
      rd_a = $urandom % 2;
      rd_b = $urandom % 2;
      req_a = '0;
      req_b = '0;
      if (rd_a) begin
        req_a.read = 1'b1; req_a.address = make_addr(SL_DATARAM1, ia); exp_a = sh_a[ia];
      end else begin
        req_a.write = 1'b1; req_a.address = make_addr(SL_DATARAM1, ia);
        req_a.lane_en = lane_en_t'($urandom % 4);
        req_a.writedata[63:0] = {$urandom, $urandom};
        for (int l = 0; l < 2; l++) if (req_a.lane_en[l]) sh_a[ia][l*32 +: 32] = req_a.writedata[l*32 +: 32];
      end
      if (rd_b) begin
        req_b.read = 1'b1; req_b.address = make_addr(SL_NSAMPLES, ib); exp_b = sh_b[ib];
      end else begin
        req_b.write = 1'b1; req_b.address = make_addr(SL_NSAMPLES, ib);
        req_b.lane_en = $urandom;
        for (int l = 0; l < LANES; l++) begin
          req_b.writedata[l*32 +: 32] = $urandom;
          if (req_b.lane_en[l]) sh_b[ib][l*32 +: 32] = req_b.writedata[l*32 +: 32];
        end
      end
      check("no wait state", !rsp_a.waitrequest && !rsp_b.waitrequest);
      @(negedge clk);
      req_a = '0;
      req_b = '0;
      check("read valid exactly when a read was issued", rsp_a.readdatavalid == rd_a && rsp_b.readdatavalid == rd_b);
      if (rd_a) check($sformatf("A[%0d] = %h expected %h", ia, rsp_a.readdata[63:0], exp_a), rsp_a.readdata[63:0] == exp_a);
      if (rd_b) check($sformatf("B[%0d] read back", ib), rsp_b.readdata == exp_b);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
