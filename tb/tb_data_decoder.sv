// tb_data_decoder: drives link words made in the testbench (a random flit,
// odd lines inverted or not, inversion line set accordingly), with random idle
// cycles, and expects the original flit exactly one clock later with
// out_valid; checks that out_data holds during idle cycles and that reset
// clears the outputs.
module tb_data_decoder;
  localparam int W = 32;
  logic clk = 1'b0, rst_n;
  logic link_valid, out_valid;
  logic [W-1:0] link_data;
  logic [W-2:0] out_data;
  int checks = 0, failures = 0, inv_seen = 0, plain_seen = 0;

  data_decoder #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-2:0] flit, last;
    logic inv;
    rst_n = 1'b0; link_valid = 1'b0; link_data = '0;
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (out_valid !== 1'b0 || out_data !== '0) begin failures++; $display("FAIL reset"); end
    rst_n = 1'b1;
    last = '0;
    for (int k = 0; k < 3000; k++) begin
      link_valid = ($urandom % 4) != 0;
      flit = 31'($urandom);
      inv  = 1'($urandom);
      link_data = {inv, inv ? (flit ^ 31'h2AAA_AAAA) : flit};
      @(posedge clk);
      #1;
      checks++;
      if (out_valid !== link_valid) begin failures++; $display("FAIL out_valid"); end
      if (link_valid) begin
        last = flit;
        if (inv) inv_seen++; else plain_seen++;
      end
      checks++;
      if (out_data !== last) begin failures++; $display("FAIL out_data=%h exp=%h", out_data, last); end
    end
    checks++;
    if (inv_seen == 0 || plain_seen == 0) begin failures++; $display("FAIL coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
