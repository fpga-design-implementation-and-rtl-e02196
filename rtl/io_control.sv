// IO control: the user-side sequencer of the multiplier.
//
// In IDLE it forwards operand loads to the register file and accepts start.
// A start launches the kernel (kstart for one cycle) and waits for kdone;
// then it steps the result converter over the E words (cv_addr = word index,
// the binary word is written to the result registers in the same cycle) and
// finally pulses done. busy is high from the cycle after start until done.
// Loads presented while busy are ignored.
// The IO block is left application-specific by the published design; this
// sequencer and its handshake are this design's choice.
module io_control #(
  parameter int unsigned E  = 33,
  parameter int unsigned AW = $clog2(E)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic          ld_valid,
  output logic          ld_we,
  output logic          busy,
  output logic          done,
  output logic          kstart,
  input  logic          kdone,
  output logic          cv_valid,
  output logic          cv_first,
  output logic [AW-1:0] cv_addr,
  output logic          res_we
);
  typedef enum logic [1:0] { IDLE, KERNEL, CONVERT, DONE } state_e;
  state_e        state;
  logic [AW-1:0] cnt;

  assign ld_we    = (state == IDLE) && ld_valid;
  assign busy     = (state != IDLE);
  assign done     = (state == DONE);
  assign kstart   = (state == IDLE) && start;
  assign cv_valid = (state == CONVERT);
  assign cv_first = cv_valid && (cnt == '0);
  assign cv_addr  = cnt;
  assign res_we   = cv_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE; cnt <= '0;
    end else begin
      unique case (state)
        IDLE:    if (start) state <= KERNEL;
        KERNEL:  if (kdone) begin state <= CONVERT; cnt <= '0; end
        CONVERT: begin
          cnt <= cnt + 1'b1;
          if (32'(cnt) == E - 1) state <= DONE;
        end
        DONE:    state <= IDLE;
        default: state <= IDLE;
      endcase
    end
  end
endmodule
