// tb_shared_ram: self-checking test of the shared RAM.
// Random byte-enabled writes through the processor port are mirrored in a
// reference array and read back through both ports (one clock latency);
// the READY flag is checked after reset, under set/clear (set wins) and
// against processor writes, which must not change it.
module tb_shared_ram;
  localparam int unsigned N_TILES = 20;
  localparam int unsigned ADDR_W  = 6;
  localparam int unsigned DEPTH   = 15 + N_TILES;

  logic clk = 0, reset;
  logic chipselect, read, write;
  logic [ADDR_W-1:0] address, rd_addr;
  logic [1:0] byteenable;
  logic [15:0] writedata, readdata, rd_data;
  logic rd_en, set_ready, clr_ready, ready;
  int checks = 0, failures = 0;
  logic [15:0] model [DEPTH];

  shared_ram #(.N_TILES(N_TILES), .ADDR_W(ADDR_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [15:0] got, input logic [15:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic host_write(input int a, input logic [1:0] be, input logic [15:0] d);
    @(negedge clk);
    chipselect = 1; write = 1; read = 0; address = ADDR_W'(a); byteenable = be; writedata = d;
    @(negedge clk);
    chipselect = 0; write = 0;
  endtask

  task automatic host_read(input int a, output logic [15:0] d);
    @(negedge clk);
    chipselect = 1; read = 1; write = 0; address = ADDR_W'(a);
    @(negedge clk);
    chipselect = 0; read = 0;
    d = readdata;
  endtask

  task automatic gfx_read(input int a, output logic [15:0] d);
    @(negedge clk);
    rd_en = 1; rd_addr = ADDR_W'(a);
    @(negedge clk);
    rd_en = 0;
    d = rd_data;
  endtask

  initial begin
    logic [15:0] d;
    chipselect = 0; read = 0; write = 0; address = 0; byteenable = 0; writedata = 0;
    rd_en = 0; rd_addr = 0; set_ready = 0; clr_ready = 0;
    reset = 1;
    repeat (3) @(negedge clk);
    reset = 0;
    check({15'd0, ready}, 16'd1, "READY after reset");

    // fill every word with full writes
    for (int a = 0; a < int'(DEPTH); a++) begin
      model[a] = 16'($urandom);
      host_write(a, 2'b11, model[a]);
    end
    // random partial writes
    for (int i = 0; i < 200; i++) begin
      int a;
      logic [1:0] be;
      logic [15:0] v;
      a = int'($urandom_range(0, DEPTH - 1));
      be = 2'($urandom);
      v = 16'($urandom);
      if (be[0]) model[a][7:0] = v[7:0];
      if (be[1]) model[a][15:8] = v[15:8];
      host_write(a, be, v);
    end
    for (int a = 0; a < int'(DEPTH); a++) begin
      host_read(a, d);
      check(d, model[a], $sformatf("port A word %0d", a));
      gfx_read(a, d);
      check(d, model[a], $sformatf("port B word %0d", a));
    end
    // beyond the READY word
    gfx_read(DEPTH + 1, d);
    check(d, 16'd0, "port B out of range");

    // READY
    host_read(DEPTH, d);
    check(d, 16'd1, "READY word reads 1");
    host_write(DEPTH, 2'b11, 16'h0000);
    host_read(DEPTH, d);
    check(d, 16'd1, "processor cannot clear READY");
    @(negedge clk); clr_ready = 1; @(negedge clk); clr_ready = 0;
    check({15'd0, ready}, 16'd0, "READY cleared");
    host_read(DEPTH, d);
    check(d, 16'd0, "READY word reads 0");
    host_write(DEPTH, 2'b11, 16'hffff);
    check({15'd0, ready}, 16'd0, "processor cannot set READY");
    @(negedge clk); set_ready = 1; clr_ready = 1; @(negedge clk); set_ready = 0; clr_ready = 0;
    check({15'd0, ready}, 16'd1, "set wins over clear");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
