// tb_snn_image_loader: presents three 784-pixel images, with random stall
// cycles (valid_in low) in the middle, and checks that new_data is high only
// while idle, that exactly the 187 retained addresses are written to slots
// 0..186 in order with their pixel values, that end_of_data pulses once
// after the last retained pixel, and that nothing is written otherwise.
module tb_snn_image_loader;
  logic clk = 1'b0, rst_n = 1'b0, enable = 1'b1, valid_in = 1'b0;
  logic [7:0] pix_in, ram_wdata;
  logic [9:0] pix_addr, ram_waddr;
  logic new_data, ram_we, end_of_data;
  int checks = 0, failures = 0;

  snn_image_loader dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int writes, eods, expect_slot;
  logic [7:0] img [784];
  always @(posedge clk) if (rst_n) begin
    if (ram_we) begin
      checks++;
      if (int'(ram_waddr) != expect_slot ||
          int'(pix_addr) != snn_pkg::sis_index(expect_slot, 784, 187) ||
          ram_wdata != img[pix_addr]) begin
        failures++;
        $display("FAIL write slot %0d addr %0d", ram_waddr, pix_addr);
      end
      expect_slot++;
      writes++;
    end
    if (end_of_data) eods++;
  end

  initial begin
    pix_in = '0; pix_addr = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int im = 0; im < 3; im++) begin
      for (int p = 0; p < 784; p++) img[p] = 8'($urandom_range(0, 255));
      writes = 0; eods = 0; expect_slot = 0;
      @(negedge clk);
      checks++;
      if (!new_data) begin failures++; $display("FAIL new_data low while idle"); end
      valid_in = 1'b1;                          // handshake cycle
      @(negedge clk);
      checks++;
      if (new_data) begin failures++; $display("FAIL new_data high while loading"); end
      for (int p = 0; p < 784; p++) begin
        while ($urandom_range(0, 9) == 0) begin   // stall
          valid_in = 1'b0; @(negedge clk);
        end
        valid_in = 1'b1; pix_addr = 10'(p); pix_in = img[p];
        @(negedge clk);
      end
      valid_in = 1'b0;
      repeat (3) @(negedge clk);
      checks++;
      if (writes != 187 || eods != 1) begin
        failures++; $display("FAIL image %0d: writes %0d eods %0d", im, writes, eods);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
