// fft_r4_iter -- iterative radix-4 decimation-in-frequency FFT core.
//
// One block of N complex samples is written in natural order, transformed
// in place in log4(N) radix-4 stages, and read out in natural order (the
// digit-reversed storage order is undone by the read addresses). One
// butterfly is computed every four cycles: its four operands are read on
// a single read port over four cycles while the previous butterfly's four
// results, each rotated by its twiddle factor on one shared complex
// multiplier, are written back on the write port. A stage therefore costs
// N cycles plus a short drain, so a 1024-point transform (5 stages)
// computes in 5*N + 5*DRAIN cycles.
//
// Scaling: the input (IN_W bits) is stored with one guard bit, in
// OUT_W = IN_W + 2 bits, and every stage divides by four with rounding.
// The output is therefore DFT(x) / (N/2), so that
//     sum |Y|^2 = (4/N) * sum |x|^2     (Parseval with a known factor),
// which is the relation the Parseval check tests. The twiddle factors are
// a quarter-wave cosine table fixed at elaboration: C[r] = round(cos(2*pi*r/N)
// * 2^(TW_W-2)), r = 0..N/4.
//
// Size: N is the largest transform; log4_n selects 4^log4_n points
// (1..log4(N), out-of-range values are clamped) for each block. It is taken
// with the first sample of a block and held until the block has left; the
// scaling above then holds with N replaced by the size in use, which is
// shown on cur_log4_n.
//
// Interface: in_ready is high while the core waits for or loads a block;
// 4^log4_n in_valid beats load it. After the compute phase the core drives
// one out_valid beat per point, back to back (no back-pressure), out_idx = frequency bin,
// out_last on the final one, then accepts the next block.
// fi_en/fi_idx/fi_mask model a soft error: the real part of output bin
// fi_idx is XORed with fi_mask. Used for fault-injection experiments.
//
// From the source design: radix-4 DIF, iterative, sequential I/O, a
// programmable number of points, 5 x 1024 compute cycles, 12-bit in / 14-bit out (14/16 for the parity
// FFT). This implementation's own choices: the memory organisation, the
// per-stage /4 scaling with one guard bit, the elaborated twiddle table
// (rather than coefficients recomputed per stage), the fault port.
module fft_r4_iter #(
  parameter int unsigned N     = 1024,
  parameter int unsigned IN_W  = 12,
  parameter int unsigned OUT_W = IN_W + 2,
  parameter int unsigned TW_W  = 16
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // transform size in use: 4^log4_n points, 1 <= log4_n <= log4(N)
  input  logic [$clog2($clog2(N)/2+1)-1:0] log4_n,
  output logic [$clog2($clog2(N)/2+1)-1:0] cur_log4_n,
  // sample input
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  in_re,
  input  logic signed [IN_W-1:0]  in_im,
  output logic                    in_ready,
  // spectrum output
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] out_re,
  output logic signed [OUT_W-1:0] out_im,
  output logic [$clog2(N)-1:0]    out_idx,
  output logic                    out_last,
  output logic                    busy,
  // fault injection
  input  logic                    fi_en,
  input  logic [$clog2(N)-1:0]    fi_idx,
  input  logic [OUT_W-1:0]        fi_mask
);
  localparam int unsigned AW     = $clog2(N);
  localparam int unsigned STAGES = AW / 2;
  localparam int unsigned QN     = N / 4;
  localparam int unsigned YW     = OUT_W + 2;          // butterfly sum width
  localparam int unsigned PW     = YW + TW_W + 1;      // product sum width
  localparam real         PI     = 3.14159265358979323846;
  localparam int unsigned SW     = $clog2(STAGES + 1);

  initial begin
    assert (N >= 4 && (1 << AW) == N && AW % 2 == 0) else $fatal(1, "N must be a power of 4");
    assert (OUT_W == IN_W + 2) else $fatal(1, "OUT_W must be IN_W + 2");
  end

  typedef enum logic [1:0] {S_LOAD, S_COMP, S_UNLOAD} state_t;
  state_t state;

  // ---------------------------------------------------------------- memory
  logic signed [OUT_W-1:0] mem_re [N];
  logic signed [OUT_W-1:0] mem_im [N];
  logic                    we;
  logic [AW-1:0]           waddr, raddr;
  logic signed [OUT_W-1:0] wdata_re, wdata_im, rdata_re, rdata_im;

  always_ff @(posedge clk) begin
    if (we) begin
      mem_re[waddr] <= wdata_re;
      mem_im[waddr] <= wdata_im;
    end
  end
  always_ff @(posedge clk) begin
    rdata_re <= mem_re[raddr];
    rdata_im <= mem_im[raddr];
  end

  // --------------------------------------------------------- twiddle table
  logic signed [TW_W-1:0] cos_tab [QN+1];
  for (genvar r = 0; r <= QN; r++) begin : g_tab
    localparam real ONE = real'(longint'(1) << (TW_W - 2));
    localparam logic signed [TW_W-1:0] C = TW_W'($rtoi($cos(2.0 * PI * r / N) * ONE + 0.5));
    assign cos_tab[r] = C;
  end

  // ------------------------------------------------------------- counters
  logic [AW-1:0]        ld_cnt;       // load / unload sample counter
  logic [SW-1:0]        stage;
  logic [SW-1:0]        ns_q;         // stages of the current block
  logic [SW-1:0]        ns;           // stages in effect this cycle
  logic [SW:0]          lg;           // log2 of the current size
  logic [AW-1:0]        last;         // current size - 1
  logic                 rd_active;
  logic [AW-1:0]        rd_cnt;       // read sequence within a stage
  logic                 rv_valid;     // read data valid
  logic [1:0]           rv_k;
  logic [AW-3+1:0]      rv_b_ext;
  logic                 wr_valid;
  logic [1:0]           wr_k;
  logic [AW-1:0]        bf_b;         // butterfly being written
  logic                 ul_valid;     // unload read issued last cycle
  logic [AW-1:0]        ul_idx;

  // operand and butterfly registers
  logic signed [OUT_W-1:0] a_re [3];
  logic signed [OUT_W-1:0] a_im [3];
  logic signed [YW-1:0]    y_re [4];
  logic signed [YW-1:0]    y_im [4];

  // address of operand k of butterfly b in stage s:
  //   q = N / 4^(s+1), j = b mod q, g = b / q, addr = g*4q + j + k*q
  function automatic logic [AW-1:0] bf_addr(input logic [AW-1:0] b, input logic [1:0] k,
                                            input int unsigned s, input int unsigned lgn);
    int unsigned lq;
    logic [AW-1:0] j, g;
    lq = lgn - 2 * (s + 1);
    j  = b & AW'((1 << lq) - 1);
    g  = b >> lq;
    return AW'((g << (lq + 2)) + j + (AW'(k) << lq));
  endfunction

  // base-4 digit reversal of an output index over nd digits
  function automatic logic [AW-1:0] digit_rev(input logic [AW-1:0] k, input int unsigned nd);
    logic [AW-1:0] r;
    r = '0;
    for (int i = 0; i < STAGES; i++)
      if (i < nd) r[2*i +: 2] = k[2*(nd-1-i) +: 2];
    return r;
  endfunction

  // size in use: taken from log4_n while waiting for a block, held after
  always_comb begin
    ns = (state == S_LOAD && ld_cnt == '0) ? log4_n : ns_q;
    if (ns == '0)                 ns = SW'(1);
    if (int'(ns) > int'(STAGES))  ns = SW'(STAGES);
    lg   = (SW+1)'(2 * ns);
    last = AW'((1 << lg) - 1);
  end
  assign cur_log4_n = ns;

  // ----------------------------------------------------- twiddle for write
  logic [AW-1:0]        tw_exp;
  logic [1:0]           tw_qd;
  localparam int unsigned TAW = $clog2(QN + 1);
  logic [TAW-1:0]       tw_r, tw_rc;
  logic signed [TW_W-1:0] cs, sn;
  logic signed [PW-1:0]   p_re, p_im;
  logic signed [PW-1:0]   half;
  logic signed [PW-1:0]   sh_re, sh_im;
  localparam logic signed [PW-1:0] MAXV = PW'((longint'(1) << (OUT_W - 1)) - 1);
  localparam logic signed [PW-1:0] MINV = -PW'(longint'(1) << (OUT_W - 1));

  function automatic logic signed [OUT_W-1:0] sat(input logic signed [PW-1:0] v);
    if (v > MAXV) return MAXV[OUT_W-1:0];
    if (v < MINV) return MINV[OUT_W-1:0];
    return v[OUT_W-1:0];
  endfunction

  always_comb begin
    int unsigned lq;
    logic [AW-1:0] j;
    lq     = int'(lg) - 2 * (int'(stage) + 1);
    j      = bf_b & AW'((1 << lq) - 1);
    // t = j * k * 4^s in units of the current size (always below 3/4 of
    // it), scaled to the N-point table
    tw_exp = AW'(((j << (2 * stage)) * wr_k) << (AW - int'(lg)));
    tw_qd  = 2'(tw_exp / QN);
    tw_r   = TAW'(tw_exp & AW'(QN - 1));
    tw_rc  = TAW'(QN) - tw_r;
    unique case (tw_qd)
      2'd0: begin cs =  cos_tab[tw_r];       sn =  cos_tab[tw_rc]; end
      2'd1: begin cs = -cos_tab[tw_rc];  sn =  cos_tab[tw_r];      end
      2'd2: begin cs = -cos_tab[tw_r];       sn = -cos_tab[tw_rc]; end
      default: begin cs = cos_tab[tw_rc]; sn = -cos_tab[tw_r];     end
    endcase
    // (yr + i yi)(cs - i sn)
    p_re  = PW'(y_re[wr_k]) * PW'(cs) + PW'(y_im[wr_k]) * PW'(sn);
    p_im  = PW'(y_im[wr_k]) * PW'(cs) - PW'(y_re[wr_k]) * PW'(sn);
    half  = PW'(1) <<< (TW_W - 1);
    sh_re = (p_re + half) >>> TW_W;   // /4 stage scaling and twiddle scale
    sh_im = (p_im + half) >>> TW_W;
  end

  // ---------------------------------------------------- port multiplexing
  always_comb begin
    we       = 1'b0;
    waddr    = '0;
    wdata_re = '0;
    wdata_im = '0;
    raddr    = '0;
    if (state == S_LOAD && in_valid) begin
      we       = 1'b1;
      waddr    = ld_cnt;
      wdata_re = OUT_W'(in_re) <<< 1;
      wdata_im = OUT_W'(in_im) <<< 1;
    end else if (state == S_COMP && wr_valid) begin
      we       = 1'b1;
      waddr    = bf_addr(bf_b, wr_k, int'(stage), int'(lg));
      wdata_re = sat(sh_re);
      wdata_im = sat(sh_im);
    end
    if (state == S_COMP) raddr = bf_addr(AW'(rd_cnt >> 2), rd_cnt[1:0], int'(stage), int'(lg));
    else                 raddr = digit_rev(ld_cnt, int'(ns));
  end

  assign in_ready = (state == S_LOAD);
  assign busy     = (state != S_LOAD);

  // ----------------------------------------------------------- control
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_LOAD;
      ld_cnt    <= '0;
      stage     <= '0;
      ns_q      <= SW'(STAGES);
      rd_active <= 1'b0;
      rd_cnt    <= '0;
      rv_valid  <= 1'b0;
      rv_k      <= '0;
      rv_b_ext  <= '0;
      wr_valid  <= 1'b0;
      wr_k      <= '0;
      bf_b      <= '0;
      ul_valid  <= 1'b0;
      ul_idx    <= '0;
      for (int i = 0; i < 3; i++) begin a_re[i] <= '0; a_im[i] <= '0; end
      for (int i = 0; i < 4; i++) begin y_re[i] <= '0; y_im[i] <= '0; end
    end else begin
      ul_valid <= 1'b0;
      unique case (state)
        S_LOAD: if (in_valid) begin
          ld_cnt <= ld_cnt + 1'b1;
          if (ld_cnt == '0) ns_q <= ns;
          if (ld_cnt == last) begin
            ld_cnt    <= '0;
            state     <= S_COMP;
            stage     <= '0;
            rd_active <= 1'b1;
            rd_cnt    <= '0;
          end
        end

        S_COMP: begin
          // read issue
          rv_valid <= rd_active;
          rv_k     <= rd_cnt[1:0];
          rv_b_ext <= (AW-1)'(rd_cnt >> 2);
          if (rd_active) begin
            rd_cnt <= rd_cnt + 1'b1;
            if (rd_cnt == last) rd_active <= 1'b0;
          end
          // operand collection and butterfly
          if (rv_valid && rv_k != 2'd3) begin
            a_re[rv_k] <= rdata_re;
            a_im[rv_k] <= rdata_im;
          end
          if (rv_valid && rv_k == 2'd3) begin
            y_re[0] <= YW'(a_re[0]) + YW'(a_re[1]) + YW'(a_re[2]) + YW'(rdata_re);
            y_im[0] <= YW'(a_im[0]) + YW'(a_im[1]) + YW'(a_im[2]) + YW'(rdata_im);
            y_re[1] <= YW'(a_re[0]) + YW'(a_im[1]) - YW'(a_re[2]) - YW'(rdata_im);
            y_im[1] <= YW'(a_im[0]) - YW'(a_re[1]) - YW'(a_im[2]) + YW'(rdata_re);
            y_re[2] <= YW'(a_re[0]) - YW'(a_re[1]) + YW'(a_re[2]) - YW'(rdata_re);
            y_im[2] <= YW'(a_im[0]) - YW'(a_im[1]) + YW'(a_im[2]) - YW'(rdata_im);
            y_re[3] <= YW'(a_re[0]) - YW'(a_im[1]) - YW'(a_re[2]) + YW'(rdata_im);
            y_im[3] <= YW'(a_im[0]) + YW'(a_re[1]) - YW'(a_im[2]) - YW'(rdata_re);
            bf_b     <= AW'(rv_b_ext);
            wr_valid <= 1'b1;
            wr_k     <= '0;
          end else if (wr_valid) begin
            wr_k <= wr_k + 1'b1;
            if (wr_k == 2'd3) wr_valid <= 1'b0;
          end
          // stage sequencing: start the next stage once the pipeline is empty
          if (!rd_active && !rv_valid && !wr_valid) begin
            if (stage == ns - 1'b1) begin
              state  <= S_UNLOAD;
              ld_cnt <= '0;
            end else begin
              stage     <= stage + 1'b1;
              rd_active <= 1'b1;
              rd_cnt    <= '0;
            end
          end
        end

        S_UNLOAD: begin
          ul_valid <= 1'b1;
          ul_idx   <= ld_cnt;
          ld_cnt   <= ld_cnt + 1'b1;
          if (ld_cnt == last) begin
            state  <= S_LOAD;
            ld_cnt <= '0;
          end
        end

        default: state <= S_LOAD;
      endcase
    end
  end

  // ------------------------------------------------------------- output
  always_comb begin
    out_valid = ul_valid;
    out_idx   = ul_idx;
    out_last  = ul_valid && (ul_idx == last);
    out_re    = rdata_re;
    out_im    = rdata_im;
    if (fi_en && ul_valid && ul_idx == fi_idx) out_re = rdata_re ^ fi_mask;
  end
endmodule
