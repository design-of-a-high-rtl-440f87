// Self-checking test of comparator_noise_control. For every step selection
// sel<k> it runs a 13-step conversion with the step signals a DAC control
// loop would produce (step<i> rises when valid falls after comparison i) and
// checks that the code is BW_ini until comparison k is done and BW_fin after,
// that sel<13> never switches, and that Start clears it.
`timescale 1ps/1ps
module tb_comparator_noise_control;
  localparam int N = 13;
  logic cmp_done, start;
  logic [N:1] step, sel;
  logic [4:1] bw_ini, bw_fin, bw;
  int checks = 0, failures = 0;
  comparator_noise_control #(.N_STEPS(N), .N_BW(4)) dut (.*);
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask
  initial begin
    #10000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    cmp_done = 0; start = 1; step = '0; #1;
    for (int k = 1; k <= N; k++) begin
      for (int rep = 0; rep < 2; rep++) begin
        sel = N'(1) << (k-1);
        bw_ini = 4'($urandom); bw_fin = ~bw_ini;
        start = 0; step = '0; #10;
        chk(bw == bw_ini, "initial code in sampling");
        start = 1; #10;
        for (int i = 1; i <= N; i++) begin
          chk(bw == ((i > k) && k < N ? bw_fin : bw_ini), $sformatf("code before comparison %0d, sel %0d", i, k));
          cmp_done = 1; #10;
          chk(bw == ((i >= k) && k < N ? bw_fin : bw_ini), $sformatf("code after comparison %0d, sel %0d", i, k));
          cmp_done = 0; #2; step[i] = 1; #10;
        end
        start = 0; #10;
        chk(bw == bw_ini, "Start clears");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
