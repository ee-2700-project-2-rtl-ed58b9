// tb_mem_interface: self-checking test of the bidirectional data bus.
//
// A stand-in memory drives the pins only while the read strobe is low. The
// test checks the strobe polarities, that a read passes the memory's byte
// onto the internal bus, that a write puts the accumulator byte on the pins
// (where the memory would sample it), and that the interface releases the
// pins when not writing.
module tb_mem_interface;
  logic       rd, wr, mem_rd_n, mem_wr_n;
  logic [7:0] wdata, bus, mem_byte;
  wire  [7:0] mem_data;
  int         checks = 0, failures = 0;

  mem_interface dut (.*);

  // Memory side of the pins.
  assign mem_data = !mem_rd_n ? mem_byte : 'z;

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) begin
      wdata = 8'($urandom); mem_byte = 8'($urandom);
      // read cycle
      rd = 1; wr = 0; #1;
      checks++; if (mem_rd_n !== 1'b0 || mem_wr_n !== 1'b1) failures++;
      checks++;
      if (bus !== mem_byte) begin
        failures++; $display("FAIL read bus=%h expected %h", bus, mem_byte);
      end
      // write cycle
      rd = 0; wr = 1; #1;
      checks++; if (mem_rd_n !== 1'b1 || mem_wr_n !== 1'b0) failures++;
      checks++;
      if (mem_data !== wdata) begin
        failures++; $display("FAIL write pins=%h expected %h", mem_data, wdata);
      end
      // idle: nobody drives; a two-state simulator resolves the floating bus to 0
      rd = 0; wr = 0; #1;
      checks++; if (mem_rd_n !== 1'b1 || mem_wr_n !== 1'b1) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
