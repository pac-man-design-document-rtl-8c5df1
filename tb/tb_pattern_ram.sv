// tb_pattern_ram: self-checking test of the image memory.
// Writes random pixels, reads them back with one clock of latency, checks
// that the output holds while rd_en is low and that reads past the end
// return 0.
module tb_pattern_ram;
  localparam int unsigned DEPTH  = 100;
  localparam int unsigned ADDR_W = 7;

  logic clk = 0;
  logic we, rd_en;
  logic [ADDR_W-1:0] waddr, raddr;
  logic [7:0] wdata, rdata;
  logic [7:0] model [DEPTH];
  int checks = 0, failures = 0;

  pattern_ram #(.DEPTH(DEPTH), .ADDR_W(ADDR_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [7:0] got, input logic [7:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    we = 0; rd_en = 0; waddr = 0; raddr = 0; wdata = 0;
    @(negedge clk);
    for (int a = 0; a < int'(DEPTH); a++) begin
      model[a] = 8'($urandom);
      we = 1; waddr = ADDR_W'(a); wdata = model[a];
      @(negedge clk);
    end
    we = 0;
    for (int i = 0; i < 300; i++) begin
      int a;
      a = int'($urandom_range(0, DEPTH - 1));
      rd_en = 1; raddr = ADDR_W'(a);
      @(negedge clk);
      check(rdata, model[a], $sformatf("read %0d", a));
      // hold while not enabled
      rd_en = 0; raddr = ADDR_W'($urandom_range(0, DEPTH - 1));
      @(negedge clk);
      check(rdata, model[a], "hold");
    end
    rd_en = 1; raddr = ADDR_W'(DEPTH + 5);
    @(negedge clk);
    check(rdata, 8'h00, "out of range");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
