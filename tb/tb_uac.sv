// tb_uac: self-checking test of the unified address converter: for every
// pixel of a 128 x 128 image the tile address must equal
// (y/8)*16 + x/8, worked out from the pixel's own x and y.
module tb_uac;
  logic [13:0] task_id;
  logic [7:0] idx_addr;
  int checks = 0, failures = 0;

  uac #(.IMG_W(128), .IMG_H(128), .TILE(8)) dut (.*);

  initial begin
    for (int y = 0; y < 128; y++)
      for (int x = 0; x < 128; x++) begin
        task_id = 14'(y * 128 + x);
        #1;
        checks++;
        if (idx_addr !== 8'((y / 8) * 16 + x / 8)) failures++;
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
