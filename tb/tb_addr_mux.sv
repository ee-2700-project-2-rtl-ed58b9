// tb_addr_mux: self-checking test of the address multiplexer.
//
// Random PC and MAR values with both select values; the address must be the
// PC when fetching and the MAR otherwise.
module tb_addr_mux;
  logic       fetch;
  logic [7:0] pc, mar, addr;
  int         checks = 0, failures = 0;

  addr_mux dut (.*);

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) begin
      fetch = 1'($urandom); pc = 8'($urandom); mar = 8'($urandom);
      #1;
      checks++;
      if (addr !== (fetch ? pc : mar)) begin
        failures++;
        $display("FAIL fetch=%b pc=%h mar=%h addr=%h", fetch, pc, mar, addr);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
