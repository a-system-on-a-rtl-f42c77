// sqrt_lut4 - integer square root of a 64-bit radicand, 4 root bits per cycle.
//
// root = floor(sqrt(radicand)), ROOT_W = RAD_W/2 bits. With the radicand read
// as a fixed-point number with 2F fraction bits, the root has F fraction bits.
//
// How it works:
//   1. The top LUT_BITS bits of the root come from a look-up table indexed by
//      the top 2*LUT_BITS bits of the radicand. For an integer square root this
//      prefix is exact: floor(sqrt(R)) >> s == floor(sqrt(R >> 2s)).
//   2. Each following iteration appends STEP bits. All 2^STEP candidate
//      roots (approximate root with every STEP-bit pattern appended, rest
//      zero) are squared in parallel and subtracted from the radicand; a
//      comparator tree keeps the candidate with the smallest non-negative
//      error, which becomes the new approximate root.
//   3. If the kept candidate's error is zero the root is exact and the unit
//      stops at once; otherwise it stops after (ROOT_W-LUT_BITS)/STEP
//      iterations (6 for the default sizes).
//
// Interface and timing: pulse start with radicand while busy is low. The
// look-up is registered in the start cycle; iteration k (k = 1..NIT) runs in
// the k-th cycle after start. done pulses for one cycle in the cycle after
// the last iteration, together with root, exact (the root squared equals the
// radicand) and iters (iterations used). Latency is 1 + iters cycles, so
// 2..7 cycles with the defaults.
//
// The look-up-table prefix of 8 bits, 4 bits per iteration, the squarer and
// comparator tree structure, the 64-bit radicand, the 32-bit root and the
// early stop on an exact root follow the documented square-root unit. The
// table contents (floor of the square root of the index, computed here at
// elaboration), the handshake and the cycle split are this design's choices.
module sqrt_lut4 #(
  parameter int unsigned RAD_W    = 64,
  parameter int unsigned LUT_BITS = 8,
  parameter int unsigned STEP     = 4
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic [RAD_W-1:0]   radicand,
  output logic               busy,
  output logic               done,
  output logic [RAD_W/2-1:0] root,
  output logic               exact,
  output logic [3:0]         iters
);

  localparam int unsigned ROOT_W = RAD_W / 2;
  localparam int unsigned IDX_W  = 2 * LUT_BITS;
  localparam int unsigned NIT    = (ROOT_W - LUT_BITS) / STEP;
  localparam int unsigned NCAND  = 1 << STEP;

  // ------------------------------------------------------- look-up table
  logic [LUT_BITS-1:0] lut [1 << IDX_W];

  initial begin
    int unsigned r;
    r = 0;
    for (int unsigned i = 0; i < (1 << IDX_W); i++) begin
      if ((r + 1) * (r + 1) <= i) r = r + 1;
      lut[i] = LUT_BITS'(r);
    end
  end

  // ------------------------------------------------------------- state
  logic [RAD_W-1:0]    rad_q;
  logic [LUT_BITS-1:0] lut_q;
  logic [ROOT_W-1:0]   root_q;
  logic                first_q;
  logic                run_q;
  logic [3:0]          it_q;

  always_ff @(posedge clk) begin
    if (start && !run_q) lut_q <= lut[radicand[RAD_W-1 -: IDX_W]];
  end

  // --------------------------------------------------- one iteration
  logic [ROOT_W-1:0] base;
  logic [ROOT_W-1:0] cand [NCAND];
  logic [RAD_W-1:0]  sq   [NCAND];
  logic [RAD_W:0]    err  [NCAND];
  logic [ROOT_W-1:0] best;
  logic [RAD_W:0]    best_err;
  logic              best_ok;
  int unsigned       shift;

  always_comb begin
    base  = first_q ? {lut_q, {(ROOT_W-LUT_BITS){1'b0}}} : root_q;
    shift = ROOT_W - LUT_BITS - STEP * (int'(it_q) + 1);
    for (int c = 0; c < NCAND; c++) begin
      cand[c] = base | (ROOT_W'(c) << shift);
      sq[c]   = RAD_W'(cand[c]) * RAD_W'(cand[c]);
      err[c]  = {1'b0, rad_q} - {1'b0, sq[c]};   // bit RAD_W set: negative
    end
    // comparator tree: smallest non-negative error wins
    best     = base;
    best_err = '1;
    best_ok  = 1'b0;
    for (int c = 0; c < NCAND; c++) begin
      if (!err[c][RAD_W] && (!best_ok || err[c] < best_err)) begin
        best     = cand[c];
        best_err = err[c];
        best_ok  = 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run_q   <= 1'b0;
      first_q <= 1'b0;
      it_q    <= '0;
      rad_q   <= '0;
      root_q  <= '0;
      done    <= 1'b0;
      exact   <= 1'b0;
      iters   <= '0;
      root    <= '0;
    end else begin
      done <= 1'b0;
      if (!run_q) begin
        if (start) begin
          rad_q   <= radicand;
          run_q   <= 1'b1;
          first_q <= 1'b1;
          it_q    <= '0;
        end
      end else begin
        first_q <= 1'b0;
        root_q  <= best;
        it_q    <= it_q + 4'd1;
        if (best_err == '0 || int'(it_q) == NIT - 1) begin
          run_q <= 1'b0;
          done  <= 1'b1;
          root  <= best;
          exact <= (best_err == '0);
          iters <= it_q + 4'd1;
        end
      end
    end
  end

  assign busy = run_q;

  initial begin
    assert (RAD_W % 2 == 0 && (ROOT_W - LUT_BITS) % STEP == 0 && NIT >= 1 && NIT < 16)
      else $error("sqrt_lut4: unsupported sizes");
  end

endmodule
