// tb_mar: self-checking test of the memory address register.
//
// Random load enable and data; the register must follow the data only on
// edges with ld=1, and reset must clear it asynchronously.
module tb_mar;
  logic       clk = 0, rst_n, ld;
  logic [7:0] d, q, model;
  int         checks = 0, failures = 0, cycles = 0;

  mar dut (.*);

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
    rst_n = 0; ld = 0; d = '0;
    #1 checks++; if (q !== 8'h00) failures++;
    @(negedge clk) rst_n = 1;
    model = 8'h00;
    repeat (2000) begin
      @(negedge clk);
      ld = 1'($urandom); d = 8'($urandom);
      @(posedge clk); #1;
      if (ld) model = d;
      checks++;
      if (q !== model) begin
        failures++;
        $display("FAIL ld=%b d=%h q=%h expected %h", ld, d, q, model);
      end
    end
    @(negedge clk); ld = 1; d = 8'h3F; @(posedge clk); #2;
    rst_n = 0; #1;
    checks++; if (q !== 8'h00) begin failures++; $display("FAIL async reset"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
