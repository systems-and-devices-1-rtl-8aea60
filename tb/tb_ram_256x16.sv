// tb_ram_256x16: self-checking test of the 256x16 memory.
// Checks the zero initial contents, then random reads and writes against a
// reference array: a write needs EN and WE high at the clock edge, a read
// returns the addressed word combinationally and 0 while EN is low. A DUMP
// pulse is applied once.
module tb_ram_256x16;
  logic clk = 0, en = 0, we = 0, dump = 0;
  logic [7:0] addr_in = '0;
  logic [15:0] data_in = '0, data_out;
  logic [15:0] ref_mem [256];
  int checks = 0, failures = 0;

  ram_256x16 dut (.clk, .en, .we, .dump, .addr_in, .data_in, .data_out);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (ref_mem[i]) ref_mem[i] = '0;
    en = 1;
    for (int i = 0; i < 256; i++) begin
      addr_in = 8'(i); #1;
      checks++;
      if (data_out !== 16'h0) begin failures++; $display("M[%0d] not zero", i); end
    end
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      en      = ($urandom_range(0, 7) != 0);
      we      = 1'($urandom_range(0, 1));
      addr_in = 8'($urandom_range(0, 31));
      data_in = 16'($urandom);
      #1;
      checks++;
      if (data_out !== (en ? ref_mem[addr_in] : 16'h0)) begin
        failures++;
        $display("read M[%0d]=%h expected %h", addr_in, data_out, ref_mem[addr_in]);
      end
      @(posedge clk); #1;
      if (en && we) ref_mem[addr_in] = data_in;
    end
    @(negedge clk); we = 0; dump = 1;
    @(negedge clk); dump = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
