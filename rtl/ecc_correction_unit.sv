// ecc_correction_unit -- error detection and correction stage of the
// parity-SOS-ECC parallel FFT.
//
// The Parseval checks can only judge a block once its last output bin has
// been seen, so the unit holds one whole block: while the FFTs stream out
// their bins (z_valid, all five FFTs in lockstep), bins z1..z4 and the
// parity bin xp are written to a block buffer at address z_idx. When the
// checks report (chk_done, with the three check results) the syndrome is
// latched and the buffer is read back in order; each bin passes through
// three copies of sos_ecc_corrector whose outputs are majority-voted, and
// leaves as y_valid / y_re / y_im / y_idx / y_last, one bin per cycle
// (4^log4_n bins, the block size taken at chk_done),
// two cycles after its read starts. Status (syndrome, located FFT,
// corrected flag) is held from chk_done until the next chk_done.
// The buffer is a plain memory and is not triplicated; the next block's
// bins must not arrive before the read-back has finished, which the
// FFT core's compute time guarantees (asserted).
module ecc_correction_unit #(
  parameter int unsigned N = 1024,
  parameter int unsigned W = 14
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  z_valid,
  input  logic [$clog2(N)-1:0]  z_idx,
  input  logic signed [W-1:0]   z_re [4],
  input  logic signed [W-1:0]   z_im [4],
  input  logic signed [W+1:0]   xp_re,
  input  logic signed [W+1:0]   xp_im,
  input  logic                  chk_done,
  input  logic [2:0]            chk_err,     // {c1, c2, c3}
  input  logic [$clog2($clog2(N)/2+1)-1:0] log4_n,  // block size 4^log4_n, read at chk_done
  output logic                  y_valid,
  output logic [$clog2(N)-1:0]  y_idx,
  output logic                  y_last,
  output logic signed [W-1:0]   y_re [4],
  output logic signed [W-1:0]   y_im [4],
  output logic [2:0]            syndrome,
  output psecc_pkg::loc_t       loc,
  output logic                  corrected,
  output logic                  vote_mismatch
);
  import psecc_pkg::*;
  localparam int unsigned AW = $clog2(N);
  localparam int unsigned BW = 8 * W + 2 * (W + 2);   // one buffered bin

  logic [BW-1:0] buf_mem [N];
  logic [BW-1:0] wword, rword;
  logic          rd_active, rd_valid;
  logic [AW-1:0] rd_addr, rd_idx;
  logic [AW-1:0] last, last_q;      // block size - 1

  assign last = AW'((1 << (2 * log4_n)) - 1);

  always_comb begin
    wword = {xp_re, xp_im, z_re[0], z_im[0], z_re[1], z_im[1], z_re[2], z_im[2], z_re[3], z_im[3]};
  end

  always_ff @(posedge clk) begin
    if (z_valid) buf_mem[z_idx] <= wword;
  end
  always_ff @(posedge clk) begin
    rword <= buf_mem[rd_addr];
  end

  // read-back sequencing
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_active <= 1'b0;
      rd_addr   <= '0;
      rd_valid  <= 1'b0;
      rd_idx    <= '0;
      syndrome  <= '0;
      last_q    <= AW'(N - 1);
    end else begin
      rd_valid <= rd_active;
      rd_idx   <= rd_addr;
      if (chk_done) begin
        syndrome  <= chk_err;
        last_q    <= last;
        rd_active <= 1'b1;
        rd_addr   <= '0;
      end else if (rd_active) begin
        rd_addr <= rd_addr + 1'b1;
        if (rd_addr == last_q) rd_active <= 1'b0;
      end
    end
  end

  // unpack the buffered bin
  logic signed [W-1:0]   b_re [4], b_im [4];
  logic signed [W+1:0]   b_xr, b_xi;
  always_comb begin
    {b_xr, b_xi, b_re[0], b_im[0], b_re[1], b_im[1], b_re[2], b_im[2], b_re[3], b_im[3]} = rword;
  end

  // three correctors and a vote
  localparam int unsigned VW = 8 * W;
  logic signed [W-1:0] c_re [3][4];
  logic signed [W-1:0] c_im [3][4];
  loc_t                c_loc [3];
  logic [VW-1:0]       c_flat [3];
  logic [VW-1:0]       v_flat;
  logic                v_mm;
  logic                loc_mm;

  for (genvar t = 0; t < 3; t++) begin : g_tmr
    sos_ecc_corrector #(.W(W)) u_corr (
      .syndrome (syndrome),
      .z_re     (b_re),
      .z_im     (b_im),
      .xp_re    (b_xr),
      .xp_im    (b_xi),
      .y_re     (c_re[t]),
      .y_im     (c_im[t]),
      .loc      (c_loc[t])
    );
    assign c_flat[t] = {c_re[t][0], c_im[t][0], c_re[t][1], c_im[t][1],
                        c_re[t][2], c_im[t][2], c_re[t][3], c_im[t][3]};
  end

  tmr_voter #(.W(VW)) u_vote (
    .a(c_flat[0]), .b(c_flat[1]), .c(c_flat[2]), .y(v_flat), .mismatch(v_mm)
  );

  logic signed [W-1:0] v_re [4], v_im [4];
  always_comb begin
    {v_re[0], v_im[0], v_re[1], v_im[1], v_re[2], v_im[2], v_re[3], v_im[3]} = v_flat;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y_valid       <= 1'b0;
      y_idx         <= '0;
      y_last        <= 1'b0;
      vote_mismatch <= 1'b0;
      for (int i = 0; i < 4; i++) begin y_re[i] <= '0; y_im[i] <= '0; end
    end else begin
      y_valid       <= rd_valid;
      y_idx         <= rd_idx;
      y_last        <= rd_valid && (rd_idx == last_q);
      vote_mismatch <= rd_valid && (v_mm || loc_mm);
      for (int i = 0; i < 4; i++) begin y_re[i] <= v_re[i]; y_im[i] <= v_im[i]; end
    end
  end

  // status: the decoded location of the three copies, voted
  logic [2:0] loc_v;
  tmr_voter #(.W(3)) u_vote_loc (
    .a(c_loc[0]), .b(c_loc[1]), .c(c_loc[2]), .y(loc_v), .mismatch(loc_mm)
  );
  assign loc       = loc_t'(loc_v);
  assign corrected = (loc inside {LOC_FFT1, LOC_FFT2, LOC_FFT3, LOC_FFT4});

  // a new block must not overwrite bins that are still to be read back
  assert property (@(posedge clk) disable iff (!rst_n) !(z_valid && rd_active && z_idx >= rd_addr))
    else $error("block buffer overrun");
endmodule
