// Self-checking test of io_control (E = 5): loads pass only while idle;
// start gives one kstart pulse and raises busy; after kdone the converter is
// stepped over words 0..E-1 with first on word 0 and a result write each
// cycle; done pulses once, one cycle after the last word, and busy drops.
module tb_io_control;
  localparam int unsigned E = 5, AW = $clog2(E);
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, ld_valid = 1'b0, kdone = 1'b0;
  logic ld_we, busy, done, kstart, cv_valid, cv_first, res_we;
  logic [AW-1:0] cv_addr;
  int checks = 0, failures = 0;

  io_control #(.E(E)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    int wait_cyc, nk;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int r = 0; r < 30; r++) begin
      @(negedge clk);
      ld_valid = 1'b1; #1; chk(ld_we && !busy, "load while idle");
      ld_valid = 1'b0; start = 1'b1; #1; chk(kstart, "kstart with start");
      @(negedge clk);
      start = 1'b0; ld_valid = 1'b1; #1;
      chk(busy && !ld_we && !kstart, "busy, load ignored, single kstart");
      ld_valid = 1'b0;
      wait_cyc = $urandom_range(6, 0);
      nk = 0;
      repeat (wait_cyc) begin
        @(negedge clk); chk(!cv_valid && !done && busy, "waiting for the kernel");
      end
      kdone = 1'b1;
      @(negedge clk); kdone = 1'b0;
      for (int i = 0; i < int'(E); i++) begin
        #1; chk(cv_valid && res_we && cv_addr == AW'(i) && cv_first == (i == 0) && !done, "conversion step");
        @(negedge clk);
      end
      #1; chk(done && busy && !cv_valid, "done pulse");
      @(negedge clk); #1; chk(!done && !busy, "back to idle");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
