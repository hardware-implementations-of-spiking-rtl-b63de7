// tb_snn_ram: writes random data to random addresses of the 187-entry RAM,
// reads back asynchronously and compares with a shadow array; also checks
// that a write is visible right after its clock edge.
module tb_snn_ram;
  logic clk = 1'b0, we = 1'b0;
  logic [9:0] waddr, raddr;
  logic [7:0] wdata, rdata;
  logic [7:0] shadow [187];
  int checks = 0, failures = 0;

  snn_ram #(.DEPTH(187), .DW(8), .AW(10)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    waddr = '0; raddr = '0; wdata = '0;
    for (int a = 0; a < 187; a++) begin          // initialise
      @(negedge clk); we = 1'b1; waddr = 10'(a); wdata = 8'($urandom_range(0, 255));
      shadow[a] = wdata;
    end
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      raddr = 10'($urandom_range(0, 186));
      #1;
      checks++;
      if (rdata != shadow[raddr]) begin
        failures++;
        if (failures < 5) $display("FAIL: addr %0d got %0d expected %0d", raddr, rdata, shadow[raddr]);
      end
      we = ($urandom_range(0, 1) == 1); waddr = 10'($urandom_range(0, 186));
      wdata = 8'($urandom_range(0, 255));
      if (we) shadow[waddr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
