// Testbench for algo_ctrl: loads a program of control-bus writes, a WAIT on a
// macro done flag, a JUMP and a HALT, and checks the exact bus transactions,
// that execution stops at the WAIT until the flag pulses, and that busy falls
// at HALT. A second run pulses the flag early: it must be remembered.
module algo_ctrl_tb;
  import flexfilm_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic prog_we, start, cb_we, busy;
  logic [3:0] prog_addr, done_in;
  logic [49:0] prog_data;
  logic [15:0] cb_addr;
  logic [31:0] cb_wdata;
  algo_ctrl #(.PROG_DEPTH(16), .NDONE(4)) dut (.*);
  task automatic chk(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", msg); end
  endtask
  function automatic logic [49:0] ins(input int op, input int a, input int b);
    return {2'(op), 16'(a), 32'(b)};
  endfunction
  int bus_a [$], bus_d [$];
  always @(posedge clk) if (rst_n && cb_we) begin bus_a.push_back(int'(cb_addr)); bus_d.push_back(int'(cb_wdata)); end
  initial begin
    logic [49:0] p [8];
    prog_we = 0; prog_addr = 0; prog_data = 0; start = 0; done_in = 0;
    p[0] = ins(0, 16'h0100, 11); p[1] = ins(0, 16'h0101, 22); p[2] = ins(2, 5, 0);
    p[3] = ins(0, 16'h0F0F, 666);                  // skipped by the jump
    p[4] = ins(0, 16'h0F0F, 667);
    p[5] = ins(1, 2, 0);                            // wait for done_in[2]
    p[6] = ins(0, 16'h0105, 1); p[7] = ins(3, 0, 0);
    repeat (3) @(posedge clk); rst_n = 1;
    for (int i = 0; i < 8; i++) begin @(negedge clk); prog_we = 1; prog_addr = 4'(i); prog_data = p[i]; end
    @(negedge clk); prog_we = 0; start = 1;
    @(negedge clk); start = 0;
    repeat (30) @(negedge clk);
    chk(busy, "should be waiting");
    chk(bus_a.size() == 2 && bus_a[0] == 16'h0100 && bus_d[0] == 11 && bus_a[1] == 16'h0101 && bus_d[1] == 22, "writes before WAIT");
    done_in = 4'b0001;                              // wrong flag
    @(negedge clk); done_in = 0;
    repeat (5) @(negedge clk);
    chk(busy && bus_a.size() == 2, "continued on the wrong flag");
    done_in = 4'b0100;
    @(negedge clk); done_in = 0;
    repeat (5) @(negedge clk);
    chk(!busy, "not halted");
    chk(bus_a.size() == 3 && bus_a[2] == 16'h0105 && bus_d[2] == 1, "write after WAIT");
    // second run: the flag pulses before the WAIT is reached and must be
    // remembered, so the program runs straight through
    @(negedge clk); start = 1;
    @(negedge clk); start = 0; done_in = 4'b0100;
    @(negedge clk); done_in = 0;
    repeat (30) @(negedge clk);
    chk(!busy, "early flag not remembered");
    chk(bus_a.size() == 6 && bus_a[5] == 16'h0105, "second run transactions");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (2000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
