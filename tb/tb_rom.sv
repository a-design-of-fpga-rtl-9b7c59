// tb_rom: writes random words through the load port, including an address
// beyond the depth that must be ignored, and checks every read against a
// shadow copy kept by the testbench.
module tb_rom;
  localparam int W = 20, DEPTH = 50;
  logic clk = 0;
  logic ld_en = 0;
  logic [15:0] ld_addr = 0, rd_addr = 0;
  logic [W-1:0] ld_data = 0, rd_data;
  logic [W-1:0] shadow [DEPTH];
  int checks = 0, failures = 0;

  rom #(.W(W), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      ld_en = 1; ld_addr = 16'(a); ld_data = W'($urandom); shadow[a] = ld_data;
    end
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      ld_addr = 16'($urandom % (DEPTH + 10)); ld_data = W'($urandom);
      if (int'(ld_addr) < DEPTH) shadow[ld_addr] = ld_data;
    end
    @(negedge clk); ld_en = 0;
    for (int a = 0; a < DEPTH + 5; a++) begin
      rd_addr = 16'(a);
      #1;
      checks++;
      if (rd_data !== ((a < DEPTH) ? shadow[a] : '0)) begin
        failures++;
        $display("FAIL addr %0d: got %h", a, rd_data);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
