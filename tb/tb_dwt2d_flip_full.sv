// tb_dwt2d_flip_full: one 512 x 512 frame through the 2-D DWT at its default
// parameters (12-bit words, 8-bit pixels), two pixels per cycle without
// pauses. The image is a smooth pattern plus noise. All 65536 (LL, LH, HL,
// HH) quadruples are compared bit for bit with the integer reference, and
// the frame must finish (frame_done) exactly 512*512/2 + 1 cycles after the
// first pair was taken, i.e. two cycles after the last pair.
module tb_dwt2d_flip_full;
  import tb_ref_pkg::*;

  localparam int DW = 12, PW = 8, W = 512, H = 512;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic          in_valid;
  logic [PW-1:0] pa, pb;
  logic          ov, fd;
  logic [7:0]    orow, ocol;
  logic [DW-1:0] ll, lh, hl, hh;

  dwt2d_flip dut (
    .clk, .rst_n, .in_valid, .pix_a(pa), .pix_b(pb),
    .out_valid(ov), .out_row(orow), .out_col(ocol),
    .ll, .lh, .hl, .hh, .frame_done(fd));

  int checks = 0, failures = 0, nout = 0;
  int cycle = 0, first_cycle = -1, done_cycle = -1;
  longint pix[], e_ll[], e_lh[], e_hl[], e_hh[];

  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (W * H / 2 + 1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cmp(input longint got, input longint exp_v, input string what);
    checks++;
    if (got != exp_v) begin
      failures++;
      if (failures < 10) $display("%s at (%0d,%0d): got %0d expected %0d",
                                  what, orow, ocol, got, exp_v);
    end
  endtask

  always @(posedge clk) begin
    if (rst_n && in_valid && first_cycle < 0) first_cycle = cycle;
    if (rst_n && ov) begin
      int idx;
      idx = int'(orow) * (W / 2) + int'(ocol);
      cmp(longint'(idx), longint'(nout), "output order");
      cmp(sext(longint'(ll), DW), e_ll[idx], "LL");
      cmp(sext(longint'(lh), DW), e_lh[idx], "LH");
      cmp(sext(longint'(hl), DW), e_hl[idx], "HL");
      cmp(sext(longint'(hh), DW), e_hh[idx], "HH");
      nout++;
      if (fd) done_cycle = cycle;
    end
  end

  initial begin
    in_valid = 0; pa = '0; pb = '0;
    pix = new[W * H];
    foreach (pix[i]) begin
      int r, c, v;
      r = i / W;
      c = i % W;
      v = 128 + (c - 256) / 4 + (r - 256) / 5 + int'($urandom_range(20)) - 10;
      pix[i] = (v < 0) ? 0 : (v > 255) ? 255 : v;
    end
    ref_dwt2d(pix, W, H, PW, DW, e_ll, e_lh, e_hl, e_hh);
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int i = 0; i < W * H / 2; i++) begin
      in_valid <= 1;
      pa <= PW'(pix[2 * i]);
      pb <= PW'(pix[2 * i + 1]);
      @(posedge clk);
    end
    in_valid <= 0;
    repeat (5) @(posedge clk);
    cmp(longint'(nout), longint'(W * H / 4), "number of outputs");
    cmp(longint'(done_cycle - first_cycle), longint'(W * H / 2 + 1), "frame cycles");
    $display("frame of %0d pixels: %0d cycles to frame_done", W * H, done_cycle - first_cycle + 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
