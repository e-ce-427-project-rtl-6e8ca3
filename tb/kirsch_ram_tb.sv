// kirsch_ram_tb: testbench of the 256 x 8 row memory.
//
// Fills all 256 words with random data, reads them back in random order
// against a shadow copy, checks the one-cycle read latency and that a read
// of the address being written returns the old word.
module kirsch_ram_tb;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  logic we = 1'b0;
  logic [7:0] addr = '0, wdata = '0, rdata;
  logic [7:0] shadow [256];

  kirsch_ram dut (.i_clock(clk), .i_we(we), .i_addr(addr), .i_wdata(wdata), .o_rdata(rdata));

  always #5 clk = ~clk;

  task automatic check(input logic [7:0] expv, input string what);
    checks++;
    if (rdata !== expv) begin
      failures++;
      $display("FAIL %s: addr %0d got %h expected %h", what, addr, rdata, expv);
    end
  endtask

  initial begin
    for (int a = 0; a < 256; a++) begin
      @(negedge clk);
      we = 1'b1; addr = 8'(a); wdata = 8'($urandom); shadow[a] = wdata;
    end
    @(negedge clk);
    we = 1'b0;
    for (int k = 0; k < 600; k++) begin
      addr = 8'($urandom);
      @(negedge clk);           // one rising edge later the word is out
      check(shadow[addr], "read");
    end
    // read-during-write returns the previous contents
    for (int k = 0; k < 50; k++) begin
      addr = 8'($urandom); wdata = 8'($urandom); we = 1'b1;
      @(negedge clk);
      check(shadow[addr], "read during write");
      shadow[addr] = wdata;
      we = 1'b0;
      @(negedge clk);
      check(shadow[addr], "read after write");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
