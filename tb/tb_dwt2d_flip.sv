// tb_dwt2d_flip: end-to-end test of the 2-D DWT on small images.
//
// Instance A (DW = 12, 16 x 8 image): several frames back to back, random and
// structured pixels, with random pauses of the input stream. Every (LL, LH,
// HL, HH) quadruple is compared bit for bit with the integer reference
// (rows, then L and H columns), and its out_row/out_col tags with the
// expected position. Checked too: output latency of two cycles after the
// odd-row input pair, one quadruple per odd-row pair and none in even rows,
// frame_done on the last quadruple of each frame.
// Instance B (DW = 20, 16 x 16 image): a constant image must give LL close to
// 2x the level-shifted pixel value (in the word's scale) and the three detail
// bands close to 0 once past the zero-start border.
//
// Mechanisms counted (each must occur): row start (zero delays), line buffer
// write (even row) and read (odd row), column start, stream pause, frame done.
// Also reported, not required: how often an AU adder left the 12-bit range
// (the row unit cannot; the column units can only for extreme images).
module tb_dwt2d_flip;
  import tb_ref_pkg::*;

  localparam int DW = 12, PW = 8, W = 16, H = 8;
  localparam int NF = 6;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic          in_valid;
  logic [PW-1:0] pa, pb;
  logic          ov, fd;
  logic [1:0]    orow;
  logic [2:0]    ocol;
  logic [DW-1:0] ll, lh, hl, hh;

  dwt2d_flip #(.DW(DW), .PIX_W(PW), .IMG_W(W), .IMG_H(H)) dut (
    .clk, .rst_n, .in_valid, .pix_a(pa), .pix_b(pb),
    .out_valid(ov), .out_row(orow), .out_col(ocol),
    .ll, .lh, .hl, .hh, .frame_done(fd));

  localparam int DWB = 20, WB = 16, HB = 16;
  logic           in_valid_b;
  logic [PW-1:0]  pab, pbb;
  logic           ovb, fdb;
  logic [2:0]     orowb, ocolb;
  logic [DWB-1:0] llb, lhb, hlb, hhb;

  dwt2d_flip #(.DW(DWB), .PIX_W(PW), .IMG_W(WB), .IMG_H(HB)) dut_b (
    .clk, .rst_n, .in_valid(in_valid_b), .pix_a(pab), .pix_b(pbb),
    .out_valid(ovb), .out_row(orowb), .out_col(ocolb),
    .ll(llb), .lh(lhb), .hl(hlb), .hh(hhb), .frame_done(fdb));

  int checks = 0, failures = 0;
  int n_row_start = 0, n_lbuf_wr = 0, n_lbuf_rd = 0, n_col_start = 0;
  int n_pause = 0, n_frame_done = 0, n_wrap = 0;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cmp(input longint got, input longint exp_v, input string what);
    checks++;
    if (got != exp_v) begin
      failures++;
      if (failures < 10) $display("%s: got %0d expected %0d", what, got, exp_v);
    end
  endtask

  // Expected outputs, queued per frame in output order.
  longint q_ll[$], q_lh[$], q_hl[$], q_hh[$];
  int     q_row[$], q_col[$], q_last[$];
  int     sent_cycle[$];   // cycle at which each odd-row pair entered
  int     cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // Output monitor.
  always @(posedge clk) begin
    if (rst_n) begin
      if (ov) begin
        longint e_ll, e_lh, e_hl, e_hh;
        int c_in;
        if (q_ll.size() == 0) begin
          checks++; failures++;
          $display("unexpected output");
        end else begin
          e_ll = q_ll.pop_front(); e_lh = q_lh.pop_front();
          e_hl = q_hl.pop_front(); e_hh = q_hh.pop_front();
          cmp(sext(longint'(ll), DW), e_ll, "LL");
          cmp(sext(longint'(lh), DW), e_lh, "LH");
          cmp(sext(longint'(hl), DW), e_hl, "HL");
          cmp(sext(longint'(hh), DW), e_hh, "HH");
          cmp(longint'(orow), longint'(q_row.pop_front()), "out_row");
          cmp(longint'(ocol), longint'(q_col.pop_front()), "out_col");
          cmp(longint'(fd), longint'(q_last.pop_front()), "frame_done");
          c_in = sent_cycle.pop_front();
          cmp(longint'(cycle - c_in), 2, "latency");
          if (fd) n_frame_done++;
        end
      end else begin
        checks++;
        if (fd) begin
          failures++;
          $display("frame_done without output");
        end
      end
    end
  end

  // Internal events, for the mechanism counts.
  always @(posedge clk) begin
    if (rst_n) begin
      if (in_valid && dut.in_col == 0) n_row_start++;
      if (dut.row_valid && !dut.odd_row) n_lbuf_wr++;
      if (dut.col_en) n_lbuf_rd++;
      if (dut.col_en && dut.col_first) n_col_start++;
    end
  end

  function automatic bit wraps(longint a, longint b);
    // True if a + b leaves the DW-bit range.
    longint s;
    s = sext(a, DW) + sext(b, DW);
    return (s >= (longint'(1) << (DW - 1))) || (s < -(longint'(1) << (DW - 1)));
  endfunction

  // Any AU whose RCA-1 (x1 + x3) or RCA-2 (product + sum) leaves the word.
  function automatic bit au_wraps(logic [DW-1:0] x1, logic [DW-1:0] x3,
                                  logic [DW-1:0] pr, logic [DW-1:0] s13);
    return wraps(longint'(x1), longint'(x3)) || wraps(longint'(pr), longint'(s13));
  endfunction

  always @(posedge clk) begin
    if (rst_n && in_valid) begin
      if (au_wraps(dut.u_row.u_au1.x1, dut.u_row.u_au1.x3, dut.u_row.u_au1.prod_sh, dut.u_row.u_au1.sum13) ||
          au_wraps(dut.u_row.u_au2.x1, dut.u_row.u_au2.x3, dut.u_row.u_au2.prod_sh, dut.u_row.u_au2.sum13) ||
          au_wraps(dut.u_row.u_au3.x1, dut.u_row.u_au3.x3, dut.u_row.u_au3.prod_sh, dut.u_row.u_au3.sum13) ||
          au_wraps(dut.u_row.u_au4.x1, dut.u_row.u_au4.x3, dut.u_row.u_au4.prod_sh, dut.u_row.u_au4.sum13)) n_wrap++;
    end
    if (rst_n && dut.col_en) begin
      if (au_wraps(dut.u_col_l.u_au1.x1, dut.u_col_l.u_au1.x3, dut.u_col_l.u_au1.prod_sh, dut.u_col_l.u_au1.sum13) ||
          au_wraps(dut.u_col_l.u_au2.x1, dut.u_col_l.u_au2.x3, dut.u_col_l.u_au2.prod_sh, dut.u_col_l.u_au2.sum13) ||
          au_wraps(dut.u_col_l.u_au3.x1, dut.u_col_l.u_au3.x3, dut.u_col_l.u_au3.prod_sh, dut.u_col_l.u_au3.sum13) ||
          au_wraps(dut.u_col_l.u_au4.x1, dut.u_col_l.u_au4.x3, dut.u_col_l.u_au4.prod_sh, dut.u_col_l.u_au4.sum13) ||
          au_wraps(dut.u_col_h.u_au1.x1, dut.u_col_h.u_au1.x3, dut.u_col_h.u_au1.prod_sh, dut.u_col_h.u_au1.sum13) ||
          au_wraps(dut.u_col_h.u_au2.x1, dut.u_col_h.u_au2.x3, dut.u_col_h.u_au2.prod_sh, dut.u_col_h.u_au2.sum13) ||
          au_wraps(dut.u_col_h.u_au3.x1, dut.u_col_h.u_au3.x3, dut.u_col_h.u_au3.prod_sh, dut.u_col_h.u_au3.sum13) ||
          au_wraps(dut.u_col_h.u_au4.x1, dut.u_col_h.u_au4.x3, dut.u_col_h.u_au4.prod_sh, dut.u_col_h.u_au4.sum13)) n_wrap++;
    end
  end

  // Input pairs of odd rows, with the cycle they were taken in.
  always @(posedge clk) begin
    if (rst_n && in_valid && dut.in_row[0]) sent_cycle.push_back(cycle);
  end

  initial begin
    longint pix[], e_ll[], e_lh[], e_hl[], e_hh[];
    in_valid = 0; pa = '0; pb = '0;
    in_valid_b = 0; pab = '0; pbb = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);

    for (int f = 0; f < NF; f++) begin
      pix = new[W * H];
      foreach (pix[i]) begin
        case (f)
          0: pix[i] = (i % W) * 8 + (i / W) * 4;               // ramp
          1: pix[i] = 128 + ((((i % W) + (i / W)) % 2) ? 9 : -9); // small checkerboard
          5: pix[i] = $urandom_range(1) ? 255 : 0;              // binary noise, overflows
          default: pix[i] = $urandom_range(255);
        endcase
      end
      ref_dwt2d(pix, W, H, PW, DW, e_ll, e_lh, e_hl, e_hh);
      for (int m = 0; m < H / 2; m++)
        for (int k = 0; k < W / 2; k++) begin
          q_ll.push_back(e_ll[m * W / 2 + k]);
          q_lh.push_back(e_lh[m * W / 2 + k]);
          q_hl.push_back(e_hl[m * W / 2 + k]);
          q_hh.push_back(e_hh[m * W / 2 + k]);
          q_row.push_back(m);
          q_col.push_back(k);
          q_last.push_back((m == H / 2 - 1) && (k == W / 2 - 1));
        end
      for (int r = 0; r < H; r++)
        for (int k = 0; k < W / 2; k++) begin
          if (f > 0 && $urandom_range(4) == 0) begin
            in_valid <= 0;
            n_pause++;
            repeat ($urandom_range(3) + 1) @(posedge clk);
          end
          in_valid <= 1;
          pa <= PW'(pix[r * W + 2 * k]);
          pb <= PW'(pix[r * W + 2 * k + 1]);
          @(posedge clk);
        end
    end
    in_valid <= 0;
    repeat (5) @(posedge clk);
    cmp(longint'(q_ll.size()), 0, "outputs missing");

    // ---- Instance B: constant image, accuracy of the pass band.
    begin
      int nll, nbad;
      real lvl, g;
      lvl = real'(200 - 128) * 64.0;   // DW=20: PIX_SHIFT = 6
      nll = 0; nbad = 0;
      fork
        begin
          for (int r = 0; r < HB; r++)
            for (int k = 0; k < WB / 2; k++) begin
              in_valid_b <= 1;
              pab <= 8'd200;
              pbb <= 8'd200;
              @(posedge clk);
            end
          in_valid_b <= 0;
        end
        begin
          // Skip the zero-start border (first five row pairs and columns).
          repeat (HB * WB / 2 + 4) begin
            @(posedge clk);
            if (ovb && orowb >= 5 && ocolb >= 5) begin
              nll++;
              g = real'(sext(longint'(llb), DWB)) / lvl;
              checks++;
              if (g < 1.99 || g > 2.01) begin
                failures++;
                $display("constant image LL gain %f", g);
              end
              checks++;
              if (sext(longint'(lhb), DWB) > 64 || sext(longint'(lhb), DWB) < -64 ||
                  sext(longint'(hlb), DWB) > 64 || sext(longint'(hlb), DWB) < -64 ||
                  sext(longint'(hhb), DWB) > 64 || sext(longint'(hhb), DWB) < -64) begin
                failures++;
                $display("constant image detail bands %0d %0d %0d",
                         sext(longint'(lhb), DWB), sext(longint'(hlb), DWB), sext(longint'(hhb), DWB));
              end
            end
          end
        end
      join
      checks++;
      if (nll == 0) begin
        failures++;
        $display("no inner outputs from the constant image");
      end
    end

    $display("mechanisms: row_start=%0d lbuf_write=%0d lbuf_read=%0d col_start=%0d pause=%0d frame_done=%0d wrap=%0d",
             n_row_start, n_lbuf_wr, n_lbuf_rd, n_col_start, n_pause, n_frame_done, n_wrap);
    if (n_row_start == 0)  begin failures++; $display("row start never happened"); end
    if (n_lbuf_wr == 0)    begin failures++; $display("line buffer write never happened"); end
    if (n_lbuf_rd == 0)    begin failures++; $display("line buffer read never happened"); end
    if (n_col_start == 0)  begin failures++; $display("column start never happened"); end
    if (n_pause == 0)      begin failures++; $display("pause never happened"); end
    if (n_frame_done != NF) begin failures++; $display("frame_done count %0d", n_frame_done); end
    checks += 6;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
