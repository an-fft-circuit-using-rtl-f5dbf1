// tb_swap_memory: a counting stream with random enable gaps goes through a
// 5-word swap memory; each enabled read must return the word written five
// enabled cycles before.
module tb_swap_memory;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, en = 0;
  logic [15:0] din, dout;
  int written = 0;

  swap_memory #(.DEPTH(5), .WIDTH(16)) dut (.clk(clk), .rst_n(rst_n), .en(en), .din(din), .dout(dout));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    din = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      en  = ($urandom_range(0, 3) != 0);
      din = 16'(written * 7 + 3);
      if (en) begin
        if (written >= 5) begin
          checks++;
          if (dout != 16'((written - 5) * 7 + 3)) begin
            failures++;
            if (failures < 10) $display("n=%0d got %0d", written, dout);
          end
        end
        written++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
