// tb_program_counter: self-checking test of the program counter.
//
// Random increment/load control with a reference model checked after every
// edge: load wins over increment, increment wraps from FF to 00, neither
// holds. Also checks that reset clears the counter asynchronously.
module tb_program_counter;
  logic       clk = 0, rst_n, inc, ld;
  logic [7:0] d, pc, model;
  int         checks = 0, failures = 0, cycles = 0;
  int         n_both = 0, n_wrap = 0;

  program_counter dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    wait (cycles == 10000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1; #1;  // a real falling edge on the asynchronous reset
    rst_n = 0; inc = 0; ld = 0; d = '0;
    #1 checks++; if (pc !== 8'h00) failures++;
    @(negedge clk) rst_n = 1;
    model = 8'h00;
    // Count through a full wrap first.
    inc = 1;
    repeat (300) begin
      @(posedge clk); #1;
      if (model == 8'hFF) n_wrap++;
      model = model + 8'd1;
      checks++; if (pc !== model) failures++;
    end
    repeat (4000) begin
      @(negedge clk);
      inc = 1'($urandom); ld = ($urandom % 4) == 0; d = 8'($urandom);
      @(posedge clk); #1;
      if (ld) begin model = d; if (inc) n_both++; end
      else if (inc) model = model + 8'd1;
      checks++;
      if (pc !== model) begin
        failures++;
        $display("FAIL inc=%b ld=%b d=%h pc=%h expected %h", inc, ld, d, pc, model);
      end
    end
    checks++; if (n_both == 0 || n_wrap == 0) failures++;
    @(negedge clk); ld = 1; d = 8'h5A; @(posedge clk); #2;
    rst_n = 0; #1;
    checks++; if (pc !== 8'h00) begin failures++; $display("FAIL async reset"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
