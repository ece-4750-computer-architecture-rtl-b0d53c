// regfile_tb: random writes and reads of the 32 x 32 register file against a
// reference array. Checks that reads see a write from the next cycle on, that
// register 0 stays zero and that reset clears every register.
module regfile_tb;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;
  logic [2:0][4:0]  raddr;
  logic [2:0][31:0] rdata;
  logic             we;
  logic [4:0]       waddr;
  logic [31:0]      wdata;
  regfile #(.NREAD(3)) dut (.*);

  int checks = 0, failures = 0;
  logic [31:0] model [32];

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; waddr = 0; wdata = 0; raddr = '0;
    for (int r = 0; r < 32; r++) model[r] = 0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int c = 0; c < 2000; c++) begin
      we    = ($urandom % 2) == 0;
      waddr = 5'($urandom);
      wdata = $urandom;
      for (int p = 0; p < 3; p++) raddr[p] = (c % 7 == 0) ? waddr : 5'($urandom);
      #1;
      for (int p = 0; p < 3; p++) begin
        checks++;
        if (rdata[p] !== model[raddr[p]]) begin
          failures++;
          $display("FAIL cycle %0d: r%0d read %h expected %h", c, raddr[p], rdata[p], model[raddr[p]]);
        end
      end
      @(posedge clk);
      if (we && waddr != 0) model[waddr] = wdata;
      #1;
    end
    rst = 1; we = 0;
    @(posedge clk); #1 rst = 0;
    for (int r = 0; r < 32; r++) begin
      raddr[0] = 5'(r); #1;
      checks++;
      if (rdata[0] !== 32'h0) begin failures++; $display("FAIL: r%0d not cleared", r); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
