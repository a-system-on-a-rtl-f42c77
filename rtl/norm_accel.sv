// norm_accel - magnitude (norm) coprocessor for complex vectors.
//
// For n complex elements v(k) = vr(k) + i vi(k) it computes
// |v(k)| = sqrt(vr(k)^2 + vi(k)^2) with 64-bit intermediate arithmetic and
// keeps a running sum of the magnitudes. Each read fetches the real and the
// imaginary part together (one complex word). Two squarers and an adder form
// the 64-bit radicand, the sqrt_lut4 unit takes its root, and an adder with
// the sum register accumulates. A multiplexer sends either each magnitude as
// it is produced, or only the final sum, to the destination memory.
// A stride lets the unit take every STRIDE-th element only (e.g. positions
// 0, 4, 8, ...).
//
// Slave registers (lane 0): 0 CTRL (write bit 0 = start), 1 STATUS (bit 0 done,
// bit 1 busy), 2 SRC (bus address of element 0; element k is read at
// SRC + k*STRIDE), 3 COUNT (elements to process), 4 STRIDE, 5 DST (bus address
// of the first output row), 6 MODE (bit 0: 0 = write every magnitude,
// 1 = write only the sum), 7 SUM_LO, 8 SUM_HI (64-bit sum of the magnitudes),
// 9 CYCLES (length of the last run).
// Source words: lane 0 real, lane 1 imaginary, 32-bit two's complement.
// Output: magnitude k (32-bit root) goes to lane k mod LANES of row
// DST + k / LANES, so the N samples buffer receives them as consecutive
// 32-bit samples; in sum mode the 64-bit sum is written to lanes 0 (low) and
// 1 (high) of row DST.
// Timing: elements are handled one after the other. With an idle fabric an
// element costs 5 + i cycles in per-element mode and 4 + i in sum mode, where
// i = 1..6 is the number of square-root iterations (fewer for exact roots);
// CYCLES adds one for the start cycle (and one for the sum write).
//
// Following the documented unit: fetch of both parts in one read, 64-bit
// arithmetic, the two multipliers, adder, square-root block, accumulator,
// output multiplexer, stride ("offset") and the choice between every result
// and the sum. The register map, lane placement and sequencing are this
// design's choices.
module norm_accel
  import ddst_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  bus_req_t csr_req,
  output bus_rsp_t csr_rsp,
  output bus_req_t m_req,
  input  bus_rsp_t m_rsp,
  output logic     busy,
  output logic     done,
  // one pulse per square root that stopped early on an exact root
  output logic     sqrt_exact
);

  localparam int unsigned LW = $clog2(LANES);

  typedef enum logic [2:0] {ST_IDLE, ST_RD, ST_RWAIT, ST_ROOT, ST_WAIT, ST_WR, ST_WR_SUM} state_e;
  state_e state;

  logic [ADDR_W-1:0] src_q, dst_q, rd_addr;
  logic [OFF_W-1:0]  count_q, stride_q, k_q;
  logic              sum_mode_q;
  logic [63:0]       sum_q;
  logic [31:0]       mag_q;
  logic [31:0]       cycles_q;
  logic              done_q;
  logic signed [31:0] re_q, im_q;

  // ------------------------------------------------------ slave port
  logic             csr_rv_q;
  logic [31:0]      csr_rd_q;
  logic [OFF_W-1:0] csr_off;
  logic             start;

  assign csr_off = csr_req.address[OFF_W-1:0];
  assign start   = csr_req.write && csr_off == CSR_CTRL && csr_req.writedata[0] && state == ST_IDLE;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      csr_rv_q   <= 1'b0;
      csr_rd_q   <= '0;
      src_q      <= '0;
      dst_q      <= '0;
      count_q    <= '0;
      stride_q   <= 16'd1;
      sum_mode_q <= 1'b0;
    end else begin
      csr_rv_q <= csr_req.read;
      if (csr_req.write && state == ST_IDLE) begin
        unique case (csr_off)
          16'd2:   src_q      <= csr_req.writedata[ADDR_W-1:0];
          16'd3:   count_q    <= csr_req.writedata[OFF_W-1:0];
          16'd4:   stride_q   <= csr_req.writedata[OFF_W-1:0];
          16'd5:   dst_q      <= csr_req.writedata[ADDR_W-1:0];
          16'd6:   sum_mode_q <= csr_req.writedata[0];
          default: ;
        endcase
      end
      if (csr_req.read) begin
        unique case (csr_off)
          CSR_STATUS: csr_rd_q <= {30'd0, state != ST_IDLE, done_q};
          16'd2:      csr_rd_q <= 32'(src_q);
          16'd3:      csr_rd_q <= 32'(count_q);
          16'd4:      csr_rd_q <= 32'(stride_q);
          16'd5:      csr_rd_q <= 32'(dst_q);
          16'd6:      csr_rd_q <= {31'd0, sum_mode_q};
          16'd7:      csr_rd_q <= sum_q[31:0];
          16'd8:      csr_rd_q <= sum_q[63:32];
          16'd9:      csr_rd_q <= cycles_q;
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

  // ------------------------------------------------------ squarers and root
  logic signed [63:0] re2, im2;
  logic [63:0]        radicand;
  logic               sq_start, sq_busy, sq_done, sq_exact;
  logic [31:0]        sq_root;
  logic [3:0]         sq_iters;

  always_comb begin
    re2      = 64'(re_q) * 64'(re_q);
    im2      = 64'(im_q) * 64'(im_q);
    radicand = 64'(re2) + 64'(im2);
    sq_start = (state == ST_ROOT);
  end

  sqrt_lut4 u_sqrt (
    .clk      (clk),
    .rst_n    (rst_n),
    .start    (sq_start),
    .radicand (radicand),
    .busy     (sq_busy),
    .done     (sq_done),
    .root     (sq_root),
    .exact    (sq_exact),
    .iters    (sq_iters)
  );

  assign sqrt_exact = sq_done && sq_exact && (sq_iters < 4'd6);

  // ------------------------------------------------------ master port
  logic [OFF_W-1:0] row_off;
  logic [LW-1:0]    lane_sel;

  always_comb begin
    rd_addr  = src_q + ADDR_W'(32'(k_q) * 32'(stride_q));
    row_off  = k_q >> LW;
    lane_sel = k_q[LW-1:0];
    m_req = '0;
    unique case (state)
      ST_RD: begin
        m_req.read    = 1'b1;
        m_req.address = rd_addr;
      end
      ST_WR: begin   // output multiplexer: one magnitude
        m_req.write   = 1'b1;
        m_req.address = dst_q + ADDR_W'(row_off);
        m_req.lane_en = lane_en_t'(1) << lane_sel;
        m_req.writedata[int'(lane_sel)*LANE_W +: LANE_W] = mag_q;
      end
      ST_WR_SUM: begin   // output multiplexer: the sum
        m_req.write   = 1'b1;
        m_req.address = dst_q;
        m_req.lane_en = lane_en_t'(2'b11);
        m_req.writedata[63:0] = sum_q;
      end
      default: ;
    endcase
  end

  // ------------------------------------------------------ control
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= ST_IDLE;
      k_q      <= '0;
      sum_q    <= '0;
      mag_q    <= '0;
      re_q     <= '0;
      im_q     <= '0;
      done_q   <= 1'b0;
      cycles_q <= '0;
    end else begin
      if (state != ST_IDLE) cycles_q <= cycles_q + 32'd1;
      unique case (state)
        ST_IDLE: if (start) begin
          k_q      <= '0;
          sum_q    <= '0;
          done_q   <= 1'b0;
          cycles_q <= 32'd1;
          if (count_q != '0) state <= ST_RD;
          else state <= sum_mode_q ? ST_WR_SUM : ST_IDLE;
          if (count_q == '0 && !sum_mode_q) done_q <= 1'b1;
        end
        ST_RD: if (!m_rsp.waitrequest) state <= ST_RWAIT;
        ST_RWAIT: if (m_rsp.readdatavalid) begin
          re_q  <= $signed(m_rsp.readdata[31:0]);
          im_q  <= $signed(m_rsp.readdata[63:32]);
          state <= ST_ROOT;
        end
        ST_ROOT: state <= ST_WAIT;
        ST_WAIT: if (sq_done) begin
          mag_q <= sq_root;
          sum_q <= sum_q + 64'(sq_root);
          if (!sum_mode_q) state <= ST_WR;
          else if (k_q + 1'b1 == count_q) state <= ST_WR_SUM;
          else begin
            k_q   <= k_q + 1'b1;
            state <= ST_RD;
          end
        end
        ST_WR: if (!m_rsp.waitrequest) begin
          if (k_q + 1'b1 == count_q) begin
            state  <= ST_IDLE;
            done_q <= 1'b1;
          end else begin
            k_q   <= k_q + 1'b1;
            state <= ST_RD;
          end
        end
        ST_WR_SUM: if (!m_rsp.waitrequest) begin
          state  <= ST_IDLE;
          done_q <= 1'b1;
        end
        default: state <= ST_IDLE;
      endcase
    end
  end

  assign busy = (state != ST_IDLE);
  assign done = done_q;

  a_sqrt_idle : assert property (@(posedge clk) disable iff (!rst_n)
    sq_start |-> !sq_busy)
    else $error("norm_accel: square root started while busy");

endmodule
