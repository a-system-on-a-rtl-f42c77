// onchip_ram - dedicated on-chip memory with a fabric slave port.
//
// One module serves all six dedicated memories of the system (DataRam1,
// DataRam2, CosRam, SinRam, the N samples buffer and Y); they differ only in
// depth and in how many 32-bit lanes a word holds. A read returns its data
// exactly one cycle after it is accepted, the one-cycle fixed latency of
// on-chip block RAM; the port never stalls (waitrequest is always low).
// A write updates only the lanes whose lane-enable bit is set, so a master
// can write a single 32-bit value into a wide row.
//
// Interface: req/rsp are the fabric structs of ddst_pkg. The word offset is
// address[OFF_W-1:0], taken modulo DEPTH (DEPTH is a power of two).
// The lane widths and depths are this design's choices; the one-cycle
// latency is the documented property of these memories.
module onchip_ram
  import ddst_pkg::*;
#(
  parameter int unsigned DEPTH  = 1024,  // words
  parameter int unsigned NLANES = 2      // 32-bit lanes per word (1..LANES)
) (
  input  logic     clk,
  input  logic     rst_n,
  input  bus_req_t req,
  output bus_rsp_t rsp
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned WW = NLANES * LANE_W;

  logic [WW-1:0] mem [DEPTH];
  logic [AW-1:0] idx;
  logic [WW-1:0] rdata_q;
  logic          rvalid_q;

  assign idx = req.address[AW-1:0];

  always_ff @(posedge clk) begin
    if (req.write) begin
      for (int l = 0; l < NLANES; l++) begin
        if (req.lane_en[l]) mem[idx][l*LANE_W +: LANE_W] <= req.writedata[l*LANE_W +: LANE_W];
      end
    end
    if (req.read) rdata_q <= mem[idx];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rvalid_q <= 1'b0;
    else        rvalid_q <= req.read;
  end

  always_comb begin
    rsp             = '0;
    rsp.waitrequest = 1'b0;
    rsp.readdatavalid = rvalid_q;
    rsp.readdata[WW-1:0] = rdata_q;
  end

  initial begin
    assert (NLANES >= 1 && NLANES <= LANES) else $error("onchip_ram: NLANES out of range");
    assert ((1 << AW) == DEPTH || DEPTH == 1) else $error("onchip_ram: DEPTH must be a power of two");
  end

endmodule
