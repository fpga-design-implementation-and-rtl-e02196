// Kernel control: sequences one Montgomery multiplication through the PE
// pipeline.
//
// The N/2 radix-4 digits of A are processed in P = ceil(N/2 / NS) passes of
// up to NS digits each (one digit per stage). A pass, counted by cnt:
//   cnt = 0          stage 0 loads its Booth triple (a_load);
//   cnt = 1 .. E     words 0 .. E-1 of B, M, SS, SC (and the hidden bit
//                    with word 0) are streamed into stage 0; in the first
//                    pass SS, SC and the hidden bit are forced to zero;
//   every cnt        the digit bus carries the triple of digit
//                    pass*NS + cnt/2, which stage cnt/2 loads at even cnt.
// The words leaving the last active stage are written back in place; when
// the top word has been written the pass ends. The final pass uses only as
// many stages as there are digits left (last_stage). A pass takes
// E + 2*L + 1 cycles for L active stages.
// start is sampled in IDLE; done pulses for one cycle at the end.
// The published design only names this block; all of its sequencing is this
// design's choice, built around the two-cycle digit loading it specifies.
module kernel_control
  import mwr4mm_pkg::*;
#(
  parameter int unsigned N  = 256,
  parameter int unsigned W  = 8,
  parameter int unsigned NS = 16,
  parameter int unsigned E  = num_words(N, W),
  parameter int unsigned AW = $clog2(E),
  parameter int unsigned DW = $clog2(N/2 + 1) + 1,
  parameter int unsigned SW = $clog2(NS + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  output logic          done,
  // register file
  output logic [AW-1:0] k_addr,
  input  logic [W-1:0]  k_b,
  input  logic [W-1:0]  k_m,
  input  logic [W-1:0]  k_ss,
  input  logic [W-1:0]  k_sc,
  input  logic          k_h,
  output logic [DW-1:0] dig_idx,
  input  logic [2:0]    dig_trip,
  output logic          kw_we,
  output logic [AW-1:0] kw_addr,
  output logic          kw_h_we,
  // kernel datapath
  output logic          a_load,
  output logic [2:0]    a_trip,
  output logic [SW-1:0] last_stage,
  output logic          in_valid,
  output logic          in_first,
  output logic          in_last,
  output logic [W-1:0]  b_in,
  output logic [W-1:0]  m_in,
  output logic [W-1:0]  ss_i,
  output logic [W-1:0]  sc_i,
  output logic          h_in,
  input  logic          out_valid,
  input  logic          out_first,
  input  logic          out_last
);
  localparam int unsigned D = N / 2;
  localparam int unsigned P = (D + NS - 1) / NS;
  localparam int unsigned LAST_L = D - (P - 1) * NS;
  localparam int unsigned CW = $clog2(E + 2 * NS + 2) + 1;
  localparam int unsigned PW = $clog2(P + 1) + 1;

  typedef enum logic [1:0] { IDLE, RUN, FINISH } state_e;
  state_e         state;
  logic [CW-1:0]  cnt;
  logic [PW-1:0]  pass;
  logic [AW-1:0]  wcnt;
  logic           last_pass, streaming;

  assign last_pass  = (32'(pass) == P - 1);
  assign last_stage = last_pass ? SW'(LAST_L - 1) : SW'(NS - 1);
  assign done       = (state == FINISH);

  // digit bus
  assign dig_idx = DW'(32'(pass) * NS + 32'(cnt >> 1));
  assign a_trip  = dig_trip;
  assign a_load  = (state == RUN) && (cnt == '0);

  // word stream into stage 0
  assign streaming = (state == RUN) && (cnt >= 1) && (32'(cnt) <= E);
  assign k_addr    = streaming ? AW'(cnt - 1'b1) : '0;
  assign in_valid  = streaming;
  assign in_first  = streaming && (cnt == CW'(1));
  assign in_last   = streaming && (32'(cnt) == E);
  assign b_in      = k_b;
  assign m_in      = k_m;
  assign ss_i     = (pass == '0) ? '0 : k_ss;
  assign sc_i     = (pass == '0) ? '0 : k_sc;
  assign h_in      = (pass == '0) ? 1'b0 : k_h;

  // write-back of the selected stage's output
  assign kw_we   = (state == RUN) && out_valid;
  assign kw_addr = out_first ? '0 : wcnt;
  assign kw_h_we = kw_we && out_first;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE; cnt <= '0; pass <= '0; wcnt <= '0;
    end else begin
      unique case (state)
        IDLE: if (start) begin
          state <= RUN; cnt <= '0; pass <= '0; wcnt <= '0;
        end
        RUN: begin
          cnt <= cnt + 1'b1;
          if (out_valid) wcnt <= kw_addr + 1'b1;
          if (out_valid && out_last) begin
            cnt <= '0;
            if (last_pass) state <= FINISH;
            else           pass  <= pass + 1'b1;
          end
        end
        FINISH: state <= IDLE;
        default: state <= IDLE;
      endcase
    end
  end
endmodule
