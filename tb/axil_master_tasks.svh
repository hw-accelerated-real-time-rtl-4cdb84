// AXI4-Lite master tasks for testbenches. Expects clk and the s_axil_*
// signals of the slave in scope. Signals change on the falling edge; the
// response channels are accepted after a random 0..2 cycle delay.
task automatic axil_write(input logic [5:0] addr, input logic [31:0] data);
  @(negedge clk);
  s_axil_awaddr  = addr;
  s_axil_awvalid = 1'b1;
  s_axil_wdata   = data;
  s_axil_wstrb   = 4'hF;
  s_axil_wvalid  = 1'b1;
  @(posedge clk);
  while (!(s_axil_awready && s_axil_wready)) @(posedge clk);
  @(negedge clk);
  s_axil_awvalid = 1'b0;
  s_axil_wvalid  = 1'b0;
  repeat ($urandom_range(2)) @(negedge clk);
  s_axil_bready = 1'b1;
  @(posedge clk);
  while (!s_axil_bvalid) @(posedge clk);
  @(negedge clk);
  s_axil_bready = 1'b0;
endtask

task automatic axil_read(input logic [5:0] addr, output logic [31:0] data);
  @(negedge clk);
  s_axil_araddr  = addr;
  s_axil_arvalid = 1'b1;
  @(posedge clk);
  while (!s_axil_arready) @(posedge clk);
  @(negedge clk);
  s_axil_arvalid = 1'b0;
  repeat ($urandom_range(2)) @(negedge clk);
  s_axil_rready = 1'b1;
  @(posedge clk);
  while (!s_axil_rvalid) @(posedge clk);
  data = s_axil_rdata;
  @(negedge clk);
  s_axil_rready = 1'b0;
endtask
