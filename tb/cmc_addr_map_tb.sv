// Testbench for cmc_addr_map: random and consecutive burst addresses; checks
// the bank/column/row split and that four consecutive bursts hit four
// different banks.
module cmc_addr_map_tb;
  int checks = 0, failures = 0;
  logic [21:0] addr;
  logic [1:0]  bank;
  logic [6:0]  col;
  logic [12:0] row;
  cmc_addr_map #(.AW(22), .BANK_W(2), .COL_W(7)) dut (.*);
  initial begin
    for (int i = 0; i < 500; i++) begin
      logic [21:0] a;
      a = 22'($urandom);
      addr = a; #1;
      checks++;
      if ({row, col, bank} !== a || bank !== a[1:0] || row !== a[21:9]) begin failures++; $display("FAIL %h", a); end
    end
    for (int b = 0; b < 64; b += 4) begin
      logic [3:0] seen;
      seen = 0;
      for (int k = 0; k < 4; k++) begin addr = 22'(1000 + b + k); #1; seen[bank] = 1; end
      checks++; if (seen != 4'hF) begin failures++; $display("FAIL interleave"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
