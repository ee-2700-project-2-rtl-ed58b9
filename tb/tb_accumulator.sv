// tb_accumulator: self-checking test of the 9-bit accumulator register.
//
// Drives random data with a random clock enable and checks after every
// rising edge that the register loaded exactly when enabled, and that the
// asynchronous reset clears it immediately, without waiting for a clock.
module tb_accumulator;
  logic       clk = 0, rst_n, en, carry_d, carry_q;
  logic [7:0] d, q;
  logic [8:0] model;
  int         checks = 0, failures = 0, cycles = 0;
  int         loads = 0, holds = 0;

  accumulator dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    wait (cycles == 5000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1; #1;  // a real falling edge on the asynchronous reset
    rst_n = 0; en = 0; d = '0; carry_d = 0;
    #1;
    checks++; if ({carry_q, q} !== 9'h000) failures++;
    @(negedge clk) rst_n = 1;
    model = 9'h000;
    repeat (2000) begin
      @(negedge clk);
      en = 1'($urandom); d = 8'($urandom); carry_d = 1'($urandom);
      @(posedge clk); #1;
      if (en) begin model = {carry_d, d}; loads++; end else holds++;
      checks++;
      if ({carry_q, q} !== model) begin
        failures++;
        $display("FAIL en=%b q=%h expected %h", en, {carry_q, q}, model);
      end
    end
    // Asynchronous reset: clears between clock edges.
    @(negedge clk); en = 1; d = 8'hFF; carry_d = 1;
    @(posedge clk); #2;
    checks++; if ({carry_q, q} !== 9'h1FF) failures++;
    rst_n = 0; #1;
    checks++; if ({carry_q, q} !== 9'h000) begin failures++; $display("FAIL async reset"); end
    checks++; if (loads == 0 || holds == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
