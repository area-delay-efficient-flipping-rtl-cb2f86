// flip_dwt1d: 1-D CDF 9/7 DWT in the flipping form, two inputs and two
// outputs per cycle.
//
// Four arithmetic units (flip_au) are chained. Each stage k keeps one delayed
// copy of its upper input (the delay "R" in front of the AU) and computes
//     r1(n) = x(2n)  + x(2n-2)  + (1/alpha)         * x(2n-1)
//     r2(n) = r1(n)  + r1(n-1)  + (1/(alpha*beta))  * x(2n-2)
//     r3(n) = r2(n)  + r2(n-1)  + (1/(beta*gamma))  * r1(n-1)
//     r4(n) = r3(n)  + r3(n-1)  + (1/(gamma*delta)) * r2(n-1)
// where the multiplied operand of each stage is the delayed value passed on
// by the previous AU's y output. Two more fixed-width multipliers scale the
// results: v_l(n) = alpha*beta*gamma*delta*K * r4(n) (low band) and
// v_h(n-1) = alpha*beta*gamma/K * r3(n-1) (high band, one pair late).
// That is six multiplications, eight additions and four delays per pair.
//
// Interface: when en is high, the pair (x_2n_1 = x(2n-1), x_2n = x(2n)) is
// consumed and v_l, v_h appear on the next clock edge with out_valid set.
// first = 1 makes the unit treat all delayed values as zero (start of a
// sequence: zero extension). The delays are DEPTH-entry memories addressed by
// slot, so one unit can run DEPTH interleaved sequences (DEPTH = 1 for a
// single sequence, slot then ignored); each slot advances only on en.
//
// The stage equations, the AU wiring and the delay count follow the flipping
// structure. The output register, en/first/slot, the coefficient exponents
// and the zero start are this design's choices. All four stages use additions,
// as every AU has only adders.
module flip_dwt1d
  import dwt_pkg::*;
#(
  parameter int DW    = 12,
  parameter int DEPTH = 1,
  localparam int SLW  = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           en,
  input  logic           first,
  input  logic [SLW-1:0] slot,
  input  logic [DW-1:0]  x_2n,     // x(2n)
  input  logic [DW-1:0]  x_2n_1,   // x(2n-1)
  output logic           out_valid,
  output logic [DW-1:0]  v_l,      // low band v_l(n)
  output logic [DW-1:0]  v_h       // high band v_h(n-1)
);

  localparam logic [DW-1:0] C1 = DW'(coef_mant(C_R1, S_R1, DW));
  localparam logic [DW-1:0] C2 = DW'(coef_mant(C_R2, S_R2, DW));
  localparam logic [DW-1:0] C3 = DW'(coef_mant(C_R3, S_R3, DW));
  localparam logic [DW-1:0] C4 = DW'(coef_mant(C_R4, S_R4, DW));
  localparam logic [DW-1:0] CH = DW'(coef_mant(C_VH, S_VH, DW));
  localparam logic [DW-1:0] CL = DW'(coef_mant(C_VL, S_VL, DW));

  // Delay memories R1..R4: stored upper input of each stage, per slot.
  logic [DW-1:0] dly1 [DEPTH];
  logic [DW-1:0] dly2 [DEPTH];
  logic [DW-1:0] dly3 [DEPTH];
  logic [DW-1:0] dly4 [DEPTH];

  logic [DW-1:0] d1, d2, d3, d4;        // delayed values seen this cycle
  logic [DW-1:0] r1, r2, r3, r4;        // AU z outputs
  logic [DW-1:0] y1, y2, y3, y4;        // AU y outputs (delayed values)
  logic [DW-1:0] ql, qh, sl, sh;

  assign d1 = first ? '0 : dly1[slot];
  assign d2 = first ? '0 : dly2[slot];
  assign d3 = first ? '0 : dly3[slot];
  assign d4 = first ? '0 : dly4[slot];

  flip_au #(.DW(DW), .SHIFT(S_R1)) u_au1 (.x1(x_2n), .x2(x_2n_1), .x3(d1), .c(C1), .z(r1), .y(y1));
  flip_au #(.DW(DW), .SHIFT(S_R2)) u_au2 (.x1(r1),   .x2(y1),     .x3(d2), .c(C2), .z(r2), .y(y2));
  flip_au #(.DW(DW), .SHIFT(S_R3)) u_au3 (.x1(r2),   .x2(y2),     .x3(d3), .c(C3), .z(r3), .y(y3));
  flip_au #(.DW(DW), .SHIFT(S_R4)) u_au4 (.x1(r3),   .x2(y3),     .x3(d4), .c(C4), .z(r4), .y(y4));

  // Output scaling (Eq. 1e, 1f): two more fixed-width multipliers.
  peb_booth_mult #(.N(DW)) u_mul_l (.x(r4), .c(CL), .p(ql));
  peb_booth_mult #(.N(DW)) u_mul_h (.x(y4), .c(CH), .p(qh));

  assign sl = DW'($signed(ql) >>> (-S_VL));
  assign sh = DW'($signed(qh) >>> (-S_VH));

  always_ff @(posedge clk) begin
    if (en) begin
      dly1[slot] <= x_2n;
      dly2[slot] <= r1;
      dly3[slot] <= r2;
      dly4[slot] <= r3;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      v_l       <= '0;
      v_h       <= '0;
    end else begin
      out_valid <= en;
      if (en) begin
        v_l <= sl;
        v_h <= sh;
      end
    end
  end

endmodule
