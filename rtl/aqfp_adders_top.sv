// aqfp_adders_top: the three AQFP arithmetic circuits side by side.
//
//   ksa16  16-bit Kogge-Stone adder with majority-3 carry merges (the
//          fabricated and measured test chip), latency 12 phase ticks
//   ksa8   8-bit Kogge-Stone adder with majority-5 carry merges, latency 6
//   fp     bfloat16 floating-point adder, latency 149
//   fa     1-bit type-A majority full adder (the cell-level design example),
//          latency 4
// Each circuit has its own operands, valid marker and result; they share only
// the phase tick `clk` (four ticks per AC excitation cycle) and the reset of
// the valid markers. The adders' carry-in ports are tied to 0, as on the test
// chips, which add two operands. The AC power-clock generator and the dc-SQUID
// output amplifiers of a physical chip are analog and lie outside this RTL.
module aqfp_adders_top
  import aqfp_pkg::*;
#(
  parameter int unsigned KSA3_WIDTH = 16,
  parameter int unsigned KSA5_WIDTH = 8
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // 16-bit majority-3 Kogge-Stone adder
  input  logic                  ksa16_in_valid,
  input  logic [KSA3_WIDTH-1:0] ksa16_a,
  input  logic [KSA3_WIDTH-1:0] ksa16_b,
  output logic                  ksa16_out_valid,
  output logic [KSA3_WIDTH:0]   ksa16_sum,
  // 8-bit majority-5 Kogge-Stone adder
  input  logic                  ksa8_in_valid,
  input  logic [KSA5_WIDTH-1:0] ksa8_a,
  input  logic [KSA5_WIDTH-1:0] ksa8_b,
  output logic                  ksa8_out_valid,
  output logic [KSA5_WIDTH:0]   ksa8_sum,
  // bfloat16 adder
  input  logic                  fp_in_valid,
  input  bf16_t                 fp_a,
  input  bf16_t                 fp_b,
  output logic                  fp_out_valid,
  output bf16_t                 fp_y,
  // 1-bit type-A full adder
  input  logic                  fa_a,
  input  logic                  fa_b,
  input  logic                  fa_c,
  output logic                  fa_cout,
  output logic                  fa_s
);
  ksa_maj3 #(.WIDTH(KSA3_WIDTH)) u_ksa16 (
    .clk(clk), .rst_n(rst_n), .in_valid(ksa16_in_valid), .a(ksa16_a), .b(ksa16_b),
    .cin(1'b0), .out_valid(ksa16_out_valid), .sum(ksa16_sum));

  ksa_maj5 #(.WIDTH(KSA5_WIDTH)) u_ksa8 (
    .clk(clk), .rst_n(rst_n), .in_valid(ksa8_in_valid), .a(ksa8_a), .b(ksa8_b),
    .cin(1'b0), .out_valid(ksa8_out_valid), .sum(ksa8_sum));

  bf16_adder u_fp (
    .clk(clk), .rst_n(rst_n), .in_valid(fp_in_valid), .a(fp_a), .b(fp_b),
    .out_valid(fp_out_valid), .y(fp_y));

  full_adder_type_a u_fa (
    .clk(clk), .a(fa_a), .b(fa_b), .c(fa_c), .cout(fa_cout), .s(fa_s));
endmodule
