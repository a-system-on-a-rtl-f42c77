// ddst_pkg - types and constants shared by the DDST channel-estimation SoC.
//
// The system is a memory-mapped SoC: one processor master, three accelerator
// masters, and a set of slaves (dedicated on-chip RAMs and the accelerators'
// control registers) joined by a switch fabric. Every transfer on the fabric
// uses the two packed structs below.
//
// Bus model (this design's own choice; the 1024-bit width is the largest
// single access the fabric allows):
//   * Data is BUS_W = 1024 bits, split into LANES = 32 lanes of 32 bits.
//     A slave that stores fewer lanes per word uses the low lanes only.
//   * A write carries a lane-enable mask; lanes not enabled are left alone.
//   * The word address is ADDR_W bits: the top SEL_W bits pick the slave,
//     the low OFF_W bits are a word offset in that slave's own word size.
//   * A request is held until waitrequest is low in the same cycle.
//     Read data returns later with readdatavalid, in request order.
package ddst_pkg;

  localparam int unsigned LANE_W = 32;
  localparam int unsigned LANES  = 32;
  localparam int unsigned BUS_W  = LANE_W * LANES;
  localparam int unsigned SEL_W  = 4;
  localparam int unsigned OFF_W  = 16;
  localparam int unsigned ADDR_W = SEL_W + OFF_W;

  typedef logic [ADDR_W-1:0] addr_t;
  typedef logic [BUS_W-1:0]  data_t;
  typedef logic [LANES-1:0]  lane_en_t;

  // Master to slave request
  typedef struct packed {
    logic     read;
    logic     write;
    addr_t    address;
    data_t    writedata;
    lane_en_t lane_en;
  } bus_req_t;

  // Slave to master response
  typedef struct packed {
    logic  waitrequest;
    logic  readdatavalid;
    data_t readdata;
  } bus_rsp_t;

  // Slave map of the system (value of address[ADDR_W-1 -: SEL_W])
  typedef enum logic [SEL_W-1:0] {
    SL_DATARAM1 = 4'd0,   // FFT ping-pong buffer 1, complex words
    SL_DATARAM2 = 4'd1,   // FFT ping-pong buffer 2, complex words
    SL_COSRAM   = 4'd2,   // twiddle factors, cosine
    SL_SINRAM   = 4'd3,   // twiddle factors, sine
    SL_NSAMPLES = 4'd4,   // N samples buffer, rows of LANES samples
    SL_YRAM     = 4'd5,   // Y, rows of LANES cyclic means
    SL_FFT_CSR  = 4'd6,   // FFT accelerator slave port
    SL_NORM_CSR = 4'd7,   // norm accelerator slave port
    SL_MEAN_CSR = 4'd8,   // arithmetic mean accelerator slave port
    SL_EXT      = 4'd9    // everything outside: off-chip memory controller etc.
  } slave_e;

  localparam int unsigned NUM_SLAVES  = 10;
  localparam int unsigned NUM_MASTERS = 4;  // 0 CPU, 1 FFT, 2 norm, 3 mean

  // Control/status register offsets common to the three accelerators
  localparam logic [OFF_W-1:0] CSR_CTRL   = 16'd0;  // write 1 to bit 0: start
  localparam logic [OFF_W-1:0] CSR_STATUS = 16'd1;  // bit0 done, bit1 busy

  function automatic addr_t make_addr(slave_e s, int unsigned off);
    return {s, off[OFF_W-1:0]};
  endfunction

  function automatic slave_e addr_slave(addr_t a);
    return slave_e'(a[ADDR_W-1 -: SEL_W]);
  endfunction

  // Read lane i of a bus word
  function automatic logic [LANE_W-1:0] lane(data_t d, int unsigned i);
    return d[i*LANE_W +: LANE_W];
  endfunction

endpackage
