// avalon_fabric - nonblocking switch fabric joining NM masters to NS slaves.
//
// Instead of one shared bus, every slave has its own arbiter and its own
// request multiplexer, so masters that address different slaves transfer in
// the same cycle; only masters that address the same slave compete. This is
// the property the system relies on: while an accelerator streams through
// its dedicated memories, the processor and the other accelerators are not
// held up.
//
// Per slave:
//   * round-robin arbiter over the masters whose address selects the slave;
//     the pointer moves past the winner each time a transfer is accepted;
//   * the winner's request is forwarded; all other requesting masters see
//     waitrequest high and must hold their request;
//   * a small FIFO remembers which master issued each accepted read, so the
//     slave's readdatavalid/readdata are routed back to that master, in order.
// A request is accepted in the cycle its master sees waitrequest low. The
// fabric adds no register stage: a slave with one-cycle latency answers the
// master one cycle after acceptance.
//
// The switch-fabric principle and the master/slave port roles are documented
// behaviour of the system; the round-robin policy, the read-owner FIFO depth
// and the combinational (unregistered) request path are this design's choices.
module avalon_fabric
  import ddst_pkg::*;
#(
  parameter int unsigned NM      = NUM_MASTERS,
  parameter int unsigned NS      = NUM_SLAVES,
  parameter int unsigned RD_PEND = 4   // reads that may be outstanding per slave
) (
  input  logic     clk,
  input  logic     rst_n,
  input  bus_req_t m_req [NM],
  output bus_rsp_t m_rsp [NM],
  output bus_req_t s_req [NS],
  input  bus_rsp_t s_rsp [NS],
  // one pulse per cycle and slave in which a request lost arbitration
  output logic [NS-1:0] contention
);

  localparam int unsigned MW = (NM > 1) ? $clog2(NM) : 1;
  localparam int unsigned PW = (RD_PEND > 1) ? $clog2(RD_PEND) : 1;

  logic [SEL_W-1:0] tgt   [NM];
  logic [NM-1:0]    mvalid;

  always_comb begin
    for (int m = 0; m < NM; m++) begin
      tgt[m]    = m_req[m].address[ADDR_W-1 -: SEL_W];
      mvalid[m] = m_req[m].read | m_req[m].write;
    end
  end

  // ---------------------------------------------------------------- arbiters
  logic [MW-1:0] prio   [NS];
  logic [MW-1:0] gidx   [NS];
  logic [NS-1:0] gvalid;
  logic [NS-1:0] accept;
  logic [NM-1:0] reqv   [NS];

  always_comb begin
    for (int s = 0; s < NS; s++) begin
      gvalid[s] = 1'b0;
      gidx[s]   = '0;
      for (int m = 0; m < NM; m++) reqv[s][m] = mvalid[m] && (int'(tgt[m]) == s);
      // first requester at or after the priority pointer
      for (int k = NM - 1; k >= 0; k--) begin
        int unsigned c;
        c = (int'(prio[s]) + k) % NM;
        if (reqv[s][c]) begin
          gvalid[s] = 1'b1;
          gidx[s]   = MW'(c);
        end
      end
      accept[s] = gvalid[s] && !s_rsp[s].waitrequest;
      s_req[s]  = '0;
      if (gvalid[s]) s_req[s] = m_req[gidx[s]];
      contention[s] = gvalid[s] && ($countones(reqv[s]) > 1);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < NS; s++) prio[s] <= '0;
    end else begin
      for (int s = 0; s < NS; s++) begin
        if (accept[s]) prio[s] <= MW'((int'(gidx[s]) + 1) % NM);
      end
    end
  end

  // ------------------------------------------------------ read owner FIFOs
  logic [MW-1:0] own_q  [NS][RD_PEND];
  logic [PW-1:0] wr_ptr [NS];
  logic [PW-1:0] rd_ptr [NS];
  logic [PW:0]   cnt    [NS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < NS; s++) begin
        wr_ptr[s] <= '0;
        rd_ptr[s] <= '0;
        cnt[s]    <= '0;
        for (int p = 0; p < RD_PEND; p++) own_q[s][p] <= '0;
      end
    end else begin
      for (int s = 0; s < NS; s++) begin
        logic push, pop;
        push = accept[s] && s_req[s].read;
        pop  = s_rsp[s].readdatavalid && (cnt[s] != 0);
        if (push) begin
          own_q[s][wr_ptr[s]] <= gidx[s];
          wr_ptr[s] <= PW'((int'(wr_ptr[s]) + 1) % RD_PEND);
        end
        if (pop) rd_ptr[s] <= PW'((int'(rd_ptr[s]) + 1) % RD_PEND);
        cnt[s] <= cnt[s] + (PW+1)'(push) - (PW+1)'(pop);
      end
    end
  end

  // ------------------------------------------------------ master responses
  always_comb begin
    for (int m = 0; m < NM; m++) begin
      m_rsp[m] = '0;
      m_rsp[m].waitrequest = mvalid[m];
      for (int s = 0; s < NS; s++) begin
        if (accept[s] && (int'(gidx[s]) == m)) m_rsp[m].waitrequest = 1'b0;
        if (s_rsp[s].readdatavalid && (cnt[s] != 0) && (int'(own_q[s][rd_ptr[s]]) == m)) begin
          m_rsp[m].readdatavalid = 1'b1;
          m_rsp[m].readdata      = s_rsp[s].readdata;
        end
      end
    end
  end

  // ------------------------------------------------------------- assertions
  for (genvar s = 0; s < NS; s++) begin : g_chk
    a_no_overflow : assert property (@(posedge clk) disable iff (!rst_n)
      !(cnt[s] == (PW+1)'(RD_PEND) && accept[s] && s_req[s].read && !s_rsp[s].readdatavalid))
      else $error("avalon_fabric: too many reads outstanding on slave %0d", s);
    a_no_orphan : assert property (@(posedge clk) disable iff (!rst_n)
      s_rsp[s].readdatavalid |-> cnt[s] != 0)
      else $error("avalon_fabric: read data from slave %0d with no read pending", s);
  end
  for (genvar m = 0; m < NM; m++) begin : g_mchk
    a_decode : assert property (@(posedge clk) disable iff (!rst_n)
      mvalid[m] |-> int'(tgt[m]) < NS)
      else $error("avalon_fabric: master %0d addresses no slave", m);
    a_one_op : assert property (@(posedge clk) disable iff (!rst_n)
      !(m_req[m].read && m_req[m].write))
      else $error("avalon_fabric: master %0d reads and writes at once", m);
  end

endmodule
