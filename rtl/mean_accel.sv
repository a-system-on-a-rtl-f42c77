// mean_accel - cyclic (arithmetic) mean coprocessor: the reshape-and-average step.
//
// DDST repeatedly reshapes an N-sample vector into a P x (N/P) matrix, sample
// n going to row n mod P, and averages each row, giving the P-element vector
// Y (Y_i = (r_i + r_{i+P} + r_{i+2P} + ...) / Np, Np = N/P). This unit skips the
// reshape: the N samples buffer stores P consecutive samples in one row, so
// one wide read fetches one column of the matrix, and P accumulators R_1..R_P
// add it lane by lane in parallel. After Np rows each accumulator is
// multiplied by the precomputed 1/Np and the P means are written to Y in one
// wide write.
//
// Slave registers (lane 0): 0 CTRL (write bit 0 = start), 1 STATUS (bit 0 done,
// bit 1 busy), 2 SRC (bus address of the first row), 3 NP (rows to read),
// 4 INV_NP (1/Np as an unsigned fraction, 1/Np * 2^32), 5 DST (bus address of
// the output row), 6 CYCLES (length of the last run).
// Arithmetic: samples and accumulators are 32-bit two's complement (sums
// wrap); the scaling product is 64 bits wide and the mean is its top half,
// mean_i = (R_i * INV_NP) >>> 32, rounded toward minus infinity.
// Timing: reads are issued back to back, one per cycle while the fabric
// accepts them; with an idle fabric a run takes Np + 4 cycles from start to
// done (Np reads, last data, multiply, write).
//
// Following the documented unit: P parallel 32-bit accumulators, P multiplier
// by 1/Np stages, wide reads of P 32-bit samples from the N samples buffer,
// results to the Y memory, a control block and done flag behind the slave
// port. The register map, the fraction format of 1/Np and the single wide
// write of Y are this design's choices; complex data is handled one
// component (real or imaginary) per run.
module mean_accel
  import ddst_pkg::*;
#(
  parameter int unsigned P = LANES   // training sequence length, samples per row
) (
  input  logic     clk,
  input  logic     rst_n,
  input  bus_req_t csr_req,
  output bus_rsp_t csr_rsp,
  output bus_req_t m_req,
  input  bus_rsp_t m_rsp,
  output logic     busy,
  output logic     done
);

  typedef enum logic [2:0] {ST_IDLE, ST_READ, ST_MUL, ST_WR} state_e;
  state_e state;

  logic [ADDR_W-1:0] src_q, dst_q;
  logic [OFF_W-1:0]  np_q, issued_q, recvd_q;
  logic [31:0]       inv_q;
  logic [31:0]       cycles_q;
  logic              done_q;

  logic signed [LANE_W-1:0] acc  [P];
  logic signed [LANE_W-1:0] mean [P];

  // ------------------------------------------------------ slave port
  logic             csr_rv_q;
  logic [31:0]      csr_rd_q;
  logic [OFF_W-1:0] csr_off;
  logic             start;

  assign csr_off = csr_req.address[OFF_W-1:0];
  assign start   = csr_req.write && csr_off == CSR_CTRL && csr_req.writedata[0] && state == ST_IDLE;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      csr_rv_q <= 1'b0;
      csr_rd_q <= '0;
      src_q    <= '0;
      dst_q    <= '0;
      np_q     <= '0;
      inv_q    <= '0;
    end else begin
      csr_rv_q <= csr_req.read;
      if (csr_req.write && state == ST_IDLE) begin
        unique case (csr_off)
          16'd2:   src_q <= csr_req.writedata[ADDR_W-1:0];
          16'd3:   np_q  <= csr_req.writedata[OFF_W-1:0];
          16'd4:   inv_q <= csr_req.writedata[31:0];
          16'd5:   dst_q <= csr_req.writedata[ADDR_W-1:0];
          default: ;
        endcase
      end
      if (csr_req.read) begin
        unique case (csr_off)
          CSR_STATUS: csr_rd_q <= {30'd0, state != ST_IDLE, done_q};
          16'd2:      csr_rd_q <= 32'(src_q);
          16'd3:      csr_rd_q <= 32'(np_q);
          16'd4:      csr_rd_q <= inv_q;
          16'd5:      csr_rd_q <= 32'(dst_q);
          16'd6:      csr_rd_q <= cycles_q;
          default:    csr_rd_q <= '0;
        endcase
      end
    end
  end

  always_comb begin
    csr_rsp = '0;
    csr_rsp.readdatavalid  = csr_rv_q;
    csr_rsp.readdata[31:0] = csr_rd_q;
  end

  // ------------------------------------------------------ master port
  always_comb begin
    m_req = '0;
    if (state == ST_READ && issued_q != np_q) begin
      m_req.read    = 1'b1;
      m_req.address = src_q + ADDR_W'(issued_q);
    end else if (state == ST_WR) begin
      m_req.write   = 1'b1;
      m_req.address = dst_q;
      m_req.lane_en = lane_en_t'((64'd1 << P) - 64'd1);
      for (int i = 0; i < P; i++) m_req.writedata[i*LANE_W +: LANE_W] = mean[i];
    end
  end

  // ------------------------------------------------------ datapath and control
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= ST_IDLE;
      issued_q <= '0;
      recvd_q  <= '0;
      done_q   <= 1'b0;
      cycles_q <= '0;
      for (int i = 0; i < P; i++) begin
        acc[i]  <= '0;
        mean[i] <= '0;
      end
    end else begin
      if (state != ST_IDLE) cycles_q <= cycles_q + 32'd1;
      unique case (state)
        ST_IDLE: if (start) begin
          state    <= (np_q == '0) ? ST_MUL : ST_READ;
          issued_q <= '0;
          recvd_q  <= '0;
          done_q   <= 1'b0;
          cycles_q <= 32'd1;
          for (int i = 0; i < P; i++) acc[i] <= '0;
        end
        ST_READ: begin
          if (m_req.read && !m_rsp.waitrequest) issued_q <= issued_q + 1'b1;
          if (m_rsp.readdatavalid) begin
            for (int i = 0; i < P; i++)
              acc[i] <= acc[i] + $signed(m_rsp.readdata[i*LANE_W +: LANE_W]);
            recvd_q <= recvd_q + 1'b1;
            if (recvd_q + 1'b1 == np_q) state <= ST_MUL;
          end
        end
        ST_MUL: begin
          for (int i = 0; i < P; i++) begin
            logic signed [63:0] prod;
            prod    = 64'(acc[i]) * $signed({32'd0, inv_q});
            mean[i] <= prod[63:32];
          end
          state <= ST_WR;
        end
        ST_WR: if (!m_rsp.waitrequest) begin
          state  <= ST_IDLE;
          done_q <= 1'b1;
        end
        default: state <= ST_IDLE;
      endcase
    end
  end

  assign busy = (state != ST_IDLE);
  assign done = done_q;

  initial assert (P >= 1 && P <= LANES) else $error("mean_accel: P must fit in one bus word");

endmodule
