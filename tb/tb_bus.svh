// Shared testbench helpers: a check counter and single-cycle bus tasks.
// The including module declares clk, a mem_req_t named req and an 8-bit
// rdata that returns the read data of req in the same cycle.
//
// The one-cycle strobes match the system bus of the design.
int checks = 0;
int failures = 0;

task automatic check(input logic ok, input string what);
  checks++;
  if (!ok) begin
    failures++;
    $display("FAIL: %s", what);
  end
endtask

task automatic bus_write(input logic [15:0] a, input logic [7:0] d);
  req.addr = a; req.wdata = d; req.we_l = 1'b0; req.re_l = 1'b1;
  @(posedge clk); #1;
  req.we_l = 1'b1;
endtask

task automatic bus_read(input logic [15:0] a, output logic [7:0] d);
  req.addr = a; req.re_l = 1'b0; req.we_l = 1'b1;
  #1 d = rdata;
  @(posedge clk); #1;
  req.re_l = 1'b1;
endtask

task automatic bus_expect(input logic [15:0] a, input logic [7:0] exp, input string what);
  logic [7:0] d;
  bus_read(a, d);
  check(d == exp, $sformatf("%s: read %04h = %02h, expected %02h", what, a, d, exp));
endtask

task automatic finish_tb();
  $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
  $finish;
endtask
