// tb_upper_nibble_cell: exhaustive check of one selection cell. Expected
// values: the flag leaving the cell is set by a 1+1 here or by the incoming
// flag; the sum bit is 1 when the flag is set and a|b otherwise.
module tb_upper_nibble_cell;
  logic a, b, set_in, s, set_out;
  int checks = 0, failures = 0;

  upper_nibble_cell dut (.a(a), .b(b), .set_in(set_in), .s(s), .set_out(set_out));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // expected {set_out, s} indexed by {set_in, a, b}
    logic [1:0] expect_tab [8];
    expect_tab = '{2'b00, 2'b01, 2'b01, 2'b11, 2'b11, 2'b11, 2'b11, 2'b11};
    for (int v = 0; v < 8; v++) begin
      {set_in, a, b} = 3'(v);
      #1;
      checks++;
      if ({set_out, s} !== expect_tab[v]) begin
        failures++;
        $display("FAIL set_in=%b a=%b b=%b got set_out,s=%b%b", set_in, a, b, set_out, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
