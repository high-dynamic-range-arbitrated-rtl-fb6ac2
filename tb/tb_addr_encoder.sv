// tb_addr_encoder: self-checking testbench for the one-hot to binary
// address ROM, at the row (60) and column (80) sizes.
module tb_addr_encoder;
  int checks = 0, failures = 0;
  logic [59:0] sel_r;
  logic [79:0] sel_c;
  logic [5:0]  addr_r;
  logic [6:0]  addr_c;
  logic        valid_r, valid_c;

  addr_encoder #(.N(60)) dut_r (.sel(sel_r), .addr(addr_r), .valid(valid_r));
  addr_encoder #(.N(80)) dut_c (.sel(sel_c), .addr(addr_c), .valid(valid_c));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sel_r = '0; sel_c = '0;
    #1;
    checks++;
    if (valid_r || valid_c) begin failures++; $display("FAIL: valid with no select"); end
    for (int i = 0; i < 80; i++) begin
      sel_c = 80'd1 << i;
      sel_r = (i < 60) ? (60'd1 << i) : '0;
      #1;
      checks++;
      if (addr_c != 7'(i) || !valid_c) begin
        failures++; $display("FAIL: column %0d gave %0d", i, addr_c);
      end
      if (i < 60) begin
        checks++;
        if (addr_r != 6'(i) || !valid_r) begin
          failures++; $display("FAIL: row %0d gave %0d", i, addr_r);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
