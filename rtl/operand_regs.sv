// Operand and partial-result registers.
//
// Holds, as E words of W bits: the multiplier A, the multiplicand B, the
// modulus M, the carry-save partial result (SS, SC) plus its hidden bit, and
// the binary result RES. Ports:
//   * load port (user side, through the IO control): writes one word of A, B
//     or M per cycle.
//   * kernel read port: word k_addr of B, M, SS, SC (combinational read) and
//     the hidden bit; the Booth triple (a[2j+1], a[2j], a[2j-1]) of digit
//     dig_idx, with a[-1] = 0 and zeros above the operand.
//   * kernel write port: one word of SS and SC, and the hidden bit.
//   * converter port: read of SS/SC at cv_addr, write of RES at res_addr.
//   * user read port: RES word at rd_addr (combinational).
// All writes take effect on the rising clock edge. No reset: every location
// read is written first (the kernel never reads SS/SC in its first pass).
// The published design only names a register block between the IO and the
// kernel; its organisation here is this design's choice.
module operand_regs
  import mwr4mm_pkg::*;
#(
  parameter int unsigned N = 256,
  parameter int unsigned W = 8,
  parameter int unsigned E = num_words(N, W),
  parameter int unsigned AW = $clog2(E),
  parameter int unsigned DW = $clog2(N/2 + 1) + 1
) (
  input  logic          clk,
  input  logic          ld_we,
  input  operand_e      ld_sel,
  input  logic [AW-1:0] ld_addr,
  input  logic [W-1:0]  ld_data,
  input  logic [AW-1:0] k_addr,
  output logic [W-1:0]  k_b,
  output logic [W-1:0]  k_m,
  output logic [W-1:0]  k_ss,
  output logic [W-1:0]  k_sc,
  output logic          k_h,
  input  logic [DW-1:0] dig_idx,
  output logic [2:0]    dig_trip,
  input  logic          kw_we,
  input  logic [AW-1:0] kw_addr,
  input  logic [W-1:0]  kw_ss,
  input  logic [W-1:0]  kw_sc,
  input  logic          kw_h_we,
  input  logic          kw_h,
  input  logic [AW-1:0] cv_addr,
  output logic [W-1:0]  cv_ss,
  output logic [W-1:0]  cv_sc,
  input  logic          res_we,
  input  logic [AW-1:0] res_addr,
  input  logic [W-1:0]  res_data,
  input  logic [AW-1:0] rd_addr,
  output logic [W-1:0]  rd_data
);
  logic [W-1:0] a_mem  [E];
  logic [W-1:0] b_mem  [E];
  logic [W-1:0] m_mem  [E];
  logic [W-1:0] ss_mem [E];
  logic [W-1:0] sc_mem [E];
  logic [W-1:0] res_mem[E];
  logic         h_q;
  logic [E*W:0] a_flat;   // {A, a[-1]=0}

  always_ff @(posedge clk) begin
    if (ld_we) begin
      unique case (ld_sel)
        OP_A:    a_mem[ld_addr] <= ld_data;
        OP_B:    b_mem[ld_addr] <= ld_data;
        OP_M:    m_mem[ld_addr] <= ld_data;
        default: ;
      endcase
    end
    if (kw_we) begin
      ss_mem[kw_addr] <= kw_ss;
      sc_mem[kw_addr] <= kw_sc;
    end
    if (kw_h_we) h_q <= kw_h;
    if (res_we)  res_mem[res_addr] <= res_data;
  end

  always_comb begin
    for (int i = 0; i < int'(E); i++) a_flat[i*W+1 +: W] = a_mem[i];
    a_flat[0] = 1'b0;
  end

  // Digit j covers bits 2j+1..2j-1 of A, i.e. bits 2j+2..2j of a_flat.
  always_comb begin
    if (32'(dig_idx) < N/2) dig_trip = a_flat[2*dig_idx +: 3];
    else                    dig_trip = 3'b000;
  end

  assign k_b     = b_mem[k_addr];
  assign k_m     = m_mem[k_addr];
  assign k_ss    = ss_mem[k_addr];
  assign k_sc    = sc_mem[k_addr];
  assign k_h     = h_q;
  assign cv_ss   = ss_mem[cv_addr];
  assign cv_sc   = sc_mem[cv_addr];
  assign rd_data = res_mem[rd_addr];
endmodule
