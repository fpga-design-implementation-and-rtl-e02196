// Scalable radix-4 Montgomery modular multiplier: RES = A * B * 2^-N mod M.
//
// Structure: IO control and IO datapath on the user side, the operand and
// partial-result registers in the middle, and the kernel (control plus the
// NS-stage PE pipeline) that performs the N/2 radix-4 iterations
// word-serially on W-bit words.
// User protocol:
//   1. While busy is low, write the E words of A, B and M (ld_valid, ld_sel,
//      ld_addr, ld_data; least significant word at address 0, unused high
//      words zero). Operand conditions: M odd, M < 2^(N-1), A < 2^(N-1),
//      B < M.
//   2. Pulse start. busy rises; done pulses once when the result is ready.
//   3. Read the E result words with rd_addr / rd_data (combinational).
// The result is a two's-complement number of E*W bits that is congruent to
// A*B*2^-N mod M and lies in (-M, 4M/3); a final correction into [0, M) is
// left to the user.
// Latency: P passes of E + 2*L + 1 cycles (L stages used in that pass,
// P = ceil(N/2 / NS)) plus E + 3 cycles: one to start the kernel, one to
// hand over to the converter, E of conversion and the done cycle.
// The block structure follows the published architecture; the user protocol,
// the operand conditions and leaving the final correction out are this
// design's choices.
module mwr4mm_top
  import mwr4mm_pkg::*;
#(
  parameter int unsigned N  = 256,
  parameter int unsigned W  = 8,
  parameter int unsigned NS = 16,
  parameter int unsigned E  = num_words(N, W),
  parameter int unsigned AW = $clog2(E)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          ld_valid,
  input  operand_e      ld_sel,
  input  logic [AW-1:0] ld_addr,
  input  logic [W-1:0]  ld_data,
  input  logic          start,
  output logic          busy,
  output logic          done,
  input  logic [AW-1:0] rd_addr,
  output logic [W-1:0]  rd_data
);
  localparam int unsigned DW = $clog2(N/2 + 1) + 1;
  localparam int unsigned SW = $clog2(NS + 1);

  logic          ld_we, kstart, kdone, cv_valid, cv_first, res_we;
  logic [AW-1:0] cv_addr, k_addr, kw_addr;
  logic [W-1:0]  k_b, k_m, k_ss, k_sc, cv_ss, cv_sc, res_word;
  logic [W-1:0]  b_in, m_in, ss_i, sc_i, ss_o, sc_o;
  logic          k_h, h_in, h_out, kw_we, kw_h_we;
  logic [DW-1:0] dig_idx;
  logic [2:0]    dig_trip, a_trip;
  logic          a_load, in_valid, in_first, in_last, out_valid, out_first, out_last;
  logic [SW-1:0] last_stage;

  io_control #(.E(E)) u_ioc (
    .clk, .rst_n, .start, .ld_valid, .ld_we, .busy, .done,
    .kstart, .kdone, .cv_valid, .cv_first, .cv_addr, .res_we);

  io_datapath #(.W(W)) u_iod (
    .clk, .rst_n, .valid(cv_valid), .first(cv_first), .ss(cv_ss), .sc(cv_sc),
    .h(k_h), .res(res_word));

  operand_regs #(.N(N), .W(W), .E(E)) u_regs (
    .clk, .ld_we, .ld_sel, .ld_addr, .ld_data,
    .k_addr, .k_b, .k_m, .k_ss, .k_sc, .k_h, .dig_idx, .dig_trip,
    .kw_we, .kw_addr, .kw_ss(ss_o), .kw_sc(sc_o), .kw_h_we, .kw_h(h_out),
    .cv_addr, .cv_ss, .cv_sc, .res_we, .res_addr(cv_addr), .res_data(res_word),
    .rd_addr, .rd_data);

  kernel_control #(.N(N), .W(W), .NS(NS), .E(E)) u_kctl (
    .clk, .rst_n, .start(kstart), .done(kdone),
    .k_addr, .k_b, .k_m, .k_ss, .k_sc, .k_h, .dig_idx, .dig_trip,
    .kw_we, .kw_addr, .kw_h_we,
    .a_load, .a_trip, .last_stage, .in_valid, .in_first, .in_last,
    .b_in, .m_in, .ss_i, .sc_i, .h_in, .out_valid, .out_first, .out_last);

  kernel_datapath #(.W(W), .NS(NS)) u_kdp (
    .clk, .rst_n, .a_load, .a_trip, .last_stage,
    .in_valid, .in_first, .in_last, .b_in, .m_in, .ss_i, .sc_i, .h_in,
    .out_valid, .out_first, .out_last, .ss_o, .sc_o, .h_out);
endmodule
