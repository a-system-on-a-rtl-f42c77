// fft_accel - radix-2 decimation-in-time FFT coprocessor with ping-pong buffers.
//
// The processor stores N = 2^LOG2N complex samples in DataRam1 (natural
// order) and the twiddle factors in CosRam/SinRam, writes LOG2N and starts the
// unit through its slave port. The unit then works alone through its master
// port:
//   pass 0    copies DataRam1[bitrev(i)] to DataRam2[i] (bit-reversed load);
//   stage s   (s = 0..LOG2N-1) reads every butterfly pair from one buffer and
//             writes the results to the other, alternating DataRam2 -> DataRam1
//             for even s and DataRam1 -> DataRam2 for odd s (ping-pong).
// The result is in DataRam2 when LOG2N is even (for instance N = 1024) and in
// DataRam1 when it is odd; STATUS bit 2 tells which. Smaller transforms use
// the same tables with the twiddle index scaled, so one unit built for
// 2^MAX_LOG2N points also serves every smaller power of two.
//
// Butterfly (span h = 2^s, j = position in group, k = j * 2^(MAX_LOG2N-1-s)):
//   t  = b * W,  W = cos(2 pi k / 2^MAX_LOG2N) - i sin(2 pi k / 2^MAX_LOG2N)
//   a' = a + t,  b' = a - t
// Data: complex word, lane 0 real, lane 1 imaginary, 32-bit two's complement.
// Twiddles: 32-bit two's complement with TW_FRAC fraction bits (1.0 = 2^30).
// Products are formed at 64 bits and shifted right arithmetically by TW_FRAC;
// sums wrap at 32 bits and there is no per-stage scaling, so inputs must
// leave LOG2N bits of headroom. CosRam/SinRam hold entries k = 0..2^(MAX_LOG2N-1)-1.
//
// Slave registers (lane 0): 0 CTRL (write bit 0 = start), 1 STATUS (bit 0 done,
// bit 1 busy, bit 2 result in DataRam2), 2 LOG2N, 3 CYCLES (clock cycles of the
// last run, counting the cycle of the start write).
// Timing: each bus access is issued and waited for in turn; with an idle
// fabric a load step costs 3 cycles and a butterfly 10 (four reads of two
// cycles, two writes): 3N + 10(N/2)LOG2N + 1 cycles, 54,273 for N = 1024.
//
// Following the documented unit: decimation in time, radix 2, ping-pong
// buffering over two data memories, cosine and sine tables in two memories,
// slave-port start and done flag. The word layout, fixed-point formats, the
// explicit bit-reversed load pass and the access order are this design's own.
module fft_accel
  import ddst_pkg::*;
#(
  parameter int unsigned MAX_LOG2N = 10,
  parameter int unsigned TW_FRAC   = 30
) (
  input  logic     clk,
  input  logic     rst_n,
  // slave port (control registers)
  input  bus_req_t csr_req,
  output bus_rsp_t csr_rsp,
  // master port
  output bus_req_t m_req,
  input  bus_rsp_t m_rsp,
  output logic     busy,
  output logic     done
);

  typedef logic signed [LANE_W-1:0] s32_t;
  typedef logic signed [63:0]       s64_t;

  typedef enum logic [1:0] {ST_IDLE, ST_RD, ST_RWAIT, ST_WR} state_e;
  state_e state;

  logic [3:0]            log2n_q;
  logic                  done_q;
  logic [31:0]           cycles_q;
  logic                  load_pass;   // bit-reversed copy pass
  logic [3:0]            stage;       // FFT stage s
  logic [MAX_LOG2N-1:0]  item;        // element (load) or butterfly index
  logic [2:0]            op;          // load: 0 read, 1 write; bfly: 0..3 reads, 4..5 writes
  s32_t                  ar, ai, br, bi, tc, ts;

  // ------------------------------------------------------ slave port
  logic        csr_rv_q;
  logic [31:0] csr_rd_q;
  logic        start;
  logic [OFF_W-1:0] csr_off;

  assign csr_off = csr_req.address[OFF_W-1:0];
  assign start   = csr_req.write && csr_off == CSR_CTRL && csr_req.writedata[0] && state == ST_IDLE;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      csr_rv_q <= 1'b0;
      csr_rd_q <= '0;
      log2n_q  <= 4'(MAX_LOG2N);
    end else begin
      csr_rv_q <= csr_req.read;
      if (csr_req.write && csr_off == 16'd2 && state == ST_IDLE) log2n_q <= csr_req.writedata[3:0];
      if (csr_req.read) begin
        unique case (csr_off)
          CSR_STATUS: csr_rd_q <= {29'd0, ~log2n_q[0], state != ST_IDLE, done_q};
          16'd2:      csr_rd_q <= {28'd0, log2n_q};
          16'd3:      csr_rd_q <= cycles_q;
          default:    csr_rd_q <= '0;
        endcase
      end
    end
  end

  always_comb begin
    csr_rsp = '0;
    csr_rsp.readdatavalid = csr_rv_q;
    csr_rsp.readdata[31:0] = csr_rd_q;
  end

  // ------------------------------------------------------ addressing
  function automatic logic [MAX_LOG2N-1:0] bitrev(logic [MAX_LOG2N-1:0] v, logic [3:0] n);
    logic [MAX_LOG2N-1:0] r;
    r = '0;
    for (int b = 0; b < MAX_LOG2N; b++) begin
      if (b < int'(n)) r[int'(n) - 1 - b] = v[b];
    end
    return r;
  endfunction

  logic [MAX_LOG2N-1:0] half, jpos, ia, ib, tw_k;
  slave_e               src_ram, dst_ram;

  always_comb begin
    half = MAX_LOG2N'(1) << stage;
    jpos = item & (half - 1'b1);
    ia   = ((item >> stage) << (stage + 1)) | jpos;
    ib   = ia | half;
    tw_k = jpos << (4'(MAX_LOG2N - 1) - stage);
    if (load_pass) begin
      src_ram = SL_DATARAM1;
      dst_ram = SL_DATARAM2;
    end else begin
      src_ram = stage[0] ? SL_DATARAM1 : SL_DATARAM2;
      dst_ram = stage[0] ? SL_DATARAM2 : SL_DATARAM1;
    end
  end

  // ------------------------------------------------------ butterfly datapath
  s64_t pr, pi;
  s32_t tr, ti;
  always_comb begin
    pr = s64_t'(br) * s64_t'(tc) + s64_t'(bi) * s64_t'(ts);
    pi = s64_t'(bi) * s64_t'(tc) - s64_t'(br) * s64_t'(ts);
    tr = s32_t'(pr >>> TW_FRAC);
    ti = s32_t'(pi >>> TW_FRAC);
  end

  // ------------------------------------------------------ master port
  always_comb begin
    m_req = '0;
    if (state == ST_RD) begin
      m_req.read = 1'b1;
      if (load_pass)    m_req.address = make_addr(src_ram, int'(bitrev(item, log2n_q)));
      else unique case (op)
        3'd0:    m_req.address = make_addr(src_ram, int'(ia));
        3'd1:    m_req.address = make_addr(src_ram, int'(ib));
        3'd2:    m_req.address = make_addr(SL_COSRAM, int'(tw_k));
        default: m_req.address = make_addr(SL_SINRAM, int'(tw_k));
      endcase
    end else if (state == ST_WR) begin
      m_req.write   = 1'b1;
      m_req.lane_en = lane_en_t'(2'b11);
      if (load_pass) begin
        m_req.address = make_addr(dst_ram, int'(item));
        m_req.writedata[63:0] = {ai, ar};
      end else if (op == 3'd4) begin
        m_req.address = make_addr(dst_ram, int'(ia));
        m_req.writedata[63:0] = {ai + ti, ar + tr};
      end else begin
        m_req.address = make_addr(dst_ram, int'(ib));
        m_req.writedata[63:0] = {ai - ti, ar - tr};
      end
    end
  end

  logic [MAX_LOG2N-1:0] last_item;
  assign last_item = load_pass ? MAX_LOG2N'((1 << log2n_q) - 1) : MAX_LOG2N'((1 << (log2n_q - 1)) - 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= ST_IDLE;
      done_q    <= 1'b0;
      cycles_q  <= '0;
      load_pass <= 1'b0;
      stage     <= '0;
      item      <= '0;
      op        <= '0;
      {ar, ai, br, bi, tc, ts} <= '0;
    end else begin
      if (state != ST_IDLE) cycles_q <= cycles_q + 32'd1;
      unique case (state)
        ST_IDLE: if (start) begin
          state     <= ST_RD;
          done_q    <= 1'b0;
          cycles_q  <= 32'd1;
          load_pass <= 1'b1;
          stage     <= '0;
          item      <= '0;
          op        <= '0;
        end
        ST_RD: if (!m_rsp.waitrequest) state <= ST_RWAIT;
        ST_RWAIT: if (m_rsp.readdatavalid) begin
          if (load_pass) begin
            ar    <= s32_t'(m_rsp.readdata[31:0]);
            ai    <= s32_t'(m_rsp.readdata[63:32]);
            state <= ST_WR;
          end else begin
            unique case (op)
              3'd0: begin ar <= s32_t'(m_rsp.readdata[31:0]); ai <= s32_t'(m_rsp.readdata[63:32]); end
              3'd1: begin br <= s32_t'(m_rsp.readdata[31:0]); bi <= s32_t'(m_rsp.readdata[63:32]); end
              3'd2: tc <= s32_t'(m_rsp.readdata[31:0]);
              default: ts <= s32_t'(m_rsp.readdata[31:0]);
            endcase
            op    <= op + 3'd1;
            state <= (op == 3'd3) ? ST_WR : ST_RD;
          end
        end
        ST_WR: if (!m_rsp.waitrequest) begin
          if (!load_pass && op != 3'd5) begin
            op <= op + 3'd1;
          end else begin
            // last access of this element or butterfly: advance
            op    <= '0;
            state <= ST_RD;
            if (item != last_item) begin
              item <= item + 1'b1;
            end else begin
              item <= '0;
              if (load_pass) begin
                load_pass <= 1'b0;
                stage     <= '0;
              end else if (stage == log2n_q - 4'd1) begin
                state  <= ST_IDLE;
                done_q <= 1'b1;
              end else begin
                stage <= stage + 4'd1;
              end
            end
          end
        end
        default: state <= ST_IDLE;
      endcase
    end
  end

  assign busy = (state != ST_IDLE);
  assign done = done_q;

  a_log2n : assert property (@(posedge clk) disable iff (!rst_n)
    start |-> (log2n_q >= 4'd1 && int'(log2n_q) <= MAX_LOG2N))
    else $error("fft_accel: LOG2N out of range");

endmodule
