// ddst_sopc - accelerator subsystem of a DDST (data-dependent superimposed
// training) channel-estimation receiver.
//
// A processor runs the receiver's stages (DC offset, carrier frequency
// offset, training-sequence and block synchronisation, channel estimation)
// as software and hands the heavy, memory-bound steps to three coprocessors:
//   * fft_accel   radix-2 FFT, ping-pong between DataRam1 and DataRam2, with
//                 twiddles from CosRam and SinRam;
//   * norm_accel  magnitudes of complex vectors (and their sum), results to
//                 the N samples buffer;
//   * mean_accel  reshape-and-average of the N samples buffer into Y.
// Each coprocessor has a slave port (parameters, start, done) and a master
// port, and once started runs on its own. Masters and slaves meet in a
// nonblocking switch fabric (avalon_fabric), so coprocessors working on
// different memories never wait for one another.
//
// Ports: the processor is outside this module; its data master is the
// cpu_req/cpu_rsp pair (master 0). Everything else on the system bus that is
// not a dedicated memory or a coprocessor (off-chip memory controller,
// peripherals) sits behind the ext_req/ext_rsp slave port (slave SL_EXT).
// busy/done mirror the coprocessors' status bits; contention and sqrt_exact
// are event pulses for observation.
//
// Address map (word address = {slave, offset}, see ddst_pkg::slave_e):
//   0 DataRam1, 1 DataRam2  (2^FFT_LOG2N words, complex: lane 0 re, lane 1 im)
//   2 CosRam, 3 SinRam      (2^(FFT_LOG2N-1) words, one lane)
//   4 N samples buffer      (NSAMP_ROWS rows of 32 lanes)
//   5 Y                     (Y_ROWS rows of 32 lanes)
//   6 FFT, 7 norm, 8 mean coprocessor registers; 9 external slave.
// The set of memories, the three coprocessors, their master/slave ports and
// the switch fabric follow the documented architecture; memory depths, the
// address map and the bus format are this design's choices.
module ddst_sopc
  import ddst_pkg::*;
#(
  parameter int unsigned FFT_LOG2N  = 10,   // 1024-point transform
  parameter int unsigned NSAMP_ROWS = 128,  // 4096 32-bit samples
  parameter int unsigned Y_ROWS     = 8,
  parameter int unsigned P          = LANES // training sequence length
) (
  input  logic            clk,
  input  logic            rst_n,
  input  bus_req_t        cpu_req,
  output bus_rsp_t        cpu_rsp,
  output bus_req_t        ext_req,
  input  bus_rsp_t        ext_rsp,
  output logic [2:0]      busy,        // {mean, norm, fft}
  output logic [2:0]      done,        // {mean, norm, fft}
  output logic [NUM_SLAVES-1:0] contention,
  output logic            sqrt_exact
);

  bus_req_t m_req [NUM_MASTERS];
  bus_rsp_t m_rsp [NUM_MASTERS];
  bus_req_t s_req [NUM_SLAVES];
  bus_rsp_t s_rsp [NUM_SLAVES];

  assign m_req[0] = cpu_req;
  assign cpu_rsp  = m_rsp[0];
  assign ext_req  = s_req[SL_EXT];
  assign s_rsp[SL_EXT] = ext_rsp;

  avalon_fabric #(.NM(NUM_MASTERS), .NS(NUM_SLAVES)) u_fabric (
    .clk, .rst_n,
    .m_req, .m_rsp, .s_req, .s_rsp,
    .contention
  );

  // ---------------------------------------------- dedicated on-chip memories
  onchip_ram #(.DEPTH(1 << FFT_LOG2N), .NLANES(2)) u_dataram1 (
    .clk, .rst_n, .req(s_req[SL_DATARAM1]), .rsp(s_rsp[SL_DATARAM1]));
  onchip_ram #(.DEPTH(1 << FFT_LOG2N), .NLANES(2)) u_dataram2 (
    .clk, .rst_n, .req(s_req[SL_DATARAM2]), .rsp(s_rsp[SL_DATARAM2]));
  onchip_ram #(.DEPTH(1 << (FFT_LOG2N - 1)), .NLANES(1)) u_cosram (
    .clk, .rst_n, .req(s_req[SL_COSRAM]), .rsp(s_rsp[SL_COSRAM]));
  onchip_ram #(.DEPTH(1 << (FFT_LOG2N - 1)), .NLANES(1)) u_sinram (
    .clk, .rst_n, .req(s_req[SL_SINRAM]), .rsp(s_rsp[SL_SINRAM]));
  onchip_ram #(.DEPTH(NSAMP_ROWS), .NLANES(LANES)) u_nsamples (
    .clk, .rst_n, .req(s_req[SL_NSAMPLES]), .rsp(s_rsp[SL_NSAMPLES]));
  onchip_ram #(.DEPTH(Y_ROWS), .NLANES(LANES)) u_yram (
    .clk, .rst_n, .req(s_req[SL_YRAM]), .rsp(s_rsp[SL_YRAM]));

  // ---------------------------------------------- coprocessors
  fft_accel #(.MAX_LOG2N(FFT_LOG2N)) u_fft (
    .clk, .rst_n,
    .csr_req(s_req[SL_FFT_CSR]), .csr_rsp(s_rsp[SL_FFT_CSR]),
    .m_req(m_req[1]), .m_rsp(m_rsp[1]),
    .busy(busy[0]), .done(done[0]));

  norm_accel u_norm (
    .clk, .rst_n,
    .csr_req(s_req[SL_NORM_CSR]), .csr_rsp(s_rsp[SL_NORM_CSR]),
    .m_req(m_req[2]), .m_rsp(m_rsp[2]),
    .busy(busy[1]), .done(done[1]), .sqrt_exact);

  mean_accel #(.P(P)) u_mean (
    .clk, .rst_n,
    .csr_req(s_req[SL_MEAN_CSR]), .csr_rsp(s_rsp[SL_MEAN_CSR]),
    .m_req(m_req[3]), .m_rsp(m_rsp[3]),
    .busy(busy[2]), .done(done[2]));

endmodule
