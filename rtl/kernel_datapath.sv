// Kernel datapath: a pipeline of NS radix-4 PEs.
//
// Stage s is PE s; the register inside each PE is the stage register, and
// each PE drives the next one combinationally. One word of B, M, SS and SC
// enters stage 0 per clock; each stage hands the same word index to the next
// stage two cycles later, so up to NS iterations (multiplier digits) are in
// flight at once. The Booth triples arrive on one broadcast bus a_trip; stage
// 0 loads it when a_load is high, stage s+1 when stage s signals a_load_next,
// which happens every second cycle along the pipeline.
// last_stage selects which stage's output leaves the kernel: NS-1 normally,
// fewer in a final pass that has fewer digits than stages. Stages after
// last_stage receive no valid words, so they stay idle.
// Outputs are those of the selected stage: combinational from its shift
// and alignment block, which works from registered values.
// The pipeline, the shared digit bus and the two-cycle stage spacing follow
// the published kernel; last_stage is this design's own addition.
module kernel_datapath #(
  parameter int unsigned W  = 8,
  parameter int unsigned NS = 16
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  a_load,
  input  logic [2:0]            a_trip,
  input  logic [$clog2(NS+1)-1:0] last_stage,
  input  logic                  in_valid,
  input  logic                  in_first,
  input  logic                  in_last,
  input  logic [W-1:0]          b_in,
  input  logic [W-1:0]          m_in,
  input  logic [W-1:0]          ss_i,
  input  logic [W-1:0]          sc_i,
  input  logic                  h_in,
  output logic                  out_valid,
  output logic                  out_first,
  output logic                  out_last,
  output logic [W-1:0]          ss_o,
  output logic [W-1:0]          sc_o,
  output logic                  h_out
);
  logic [NS:0]        v, f, l, ld, h;
  logic [W-1:0]       b  [NS+1];
  logic [W-1:0]       m  [NS+1];
  logic [W-1:0]       ss [NS+1];
  logic [W-1:0]       sc [NS+1];

  assign v[0] = in_valid;  assign f[0] = in_first; assign l[0] = in_last;
  assign ld[0] = a_load;   assign h[0] = in_valid & in_first & h_in;
  assign b[0] = b_in; assign m[0] = m_in; assign ss[0] = ss_i; assign sc[0] = sc_i;

  for (genvar s = 0; s < NS; s++) begin : g_stage
    logic en;
    if (s == 0) begin : g_always
      assign en = 1'b1;
    end else begin : g_sel
      assign en = (last_stage >= $clog2(NS+1)'(s));
    end
    pe #(.W(W)) u_pe (
      .clk, .rst_n,
      .a_load(ld[s]), .a_trip,
      .in_valid(v[s] & en), .in_first(f[s]), .in_last(l[s]),
      .b_in(b[s]), .m_in(m[s]), .ss_i(ss[s]), .sc_i(sc[s]), .h_in(h[s]),
      .a_load_next(ld[s+1]),
      .out_valid(v[s+1]), .out_first(f[s+1]), .out_last(l[s+1]),
      .b_out(b[s+1]), .m_out(m[s+1]), .ss_o(ss[s+1]), .sc_o(sc[s+1]), .h_out(h[s+1]));
  end

  always_comb begin
    out_valid = v[last_stage+1];
    out_first = f[last_stage+1];
    out_last  = l[last_stage+1];
    ss_o    = ss[last_stage+1];
    sc_o    = sc[last_stage+1];
    h_out     = h[last_stage+1];
  end
endmodule
