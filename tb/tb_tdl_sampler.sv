// tb_tdl_sampler: drives carry outputs and checks the sub-TDL regrouping
// (sub-TDL j bit i = output TAP_MAP[j] of element i), the one-clock sampling
// delay, and hit detection on both polarities of the first tap.
module tb_tdl_sampler;
  localparam int N = 6, M = 4, S = 4, OUTS = 2 * M;
  localparam logic [8*S-1:0] MAP = 32'h06_03_00_07;   // mixed CO / O choice
  logic clk = 0, rst = 1;
  logic [N*OUTS-1:0] carry_out;
  logic [S-1:0][N-1:0] sub_code, exp_code, prev_code;
  logic hit, level;
  int checks = 0, failures = 0, hits = 0;
  logic first_prev;

  tdl_sampler #(.N_CARRY(N), .MUX_PER_CARRY(M), .NUM_SUB(S), .TAP_MAP(MAP)) dut (
    .clk, .rst, .carry_out, .sub_code, .hit, .level);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    carry_out = '0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    @(posedge clk); #1;
    prev_code = sub_code;
    for (int t = 0; t < 400; t++) begin
      carry_out = {N*OUTS{1'b0}} | {$urandom, $urandom};
      for (int j = 0; j < S; j++)
        for (int i = 0; i < N; i++)
          exp_code[j][i] = carry_out[i*OUTS + int'(MAP[8*j +: 8])];
      first_prev = prev_code[0][0];
      @(posedge clk); #1;
      checks++;
      if (sub_code !== exp_code) begin
        failures++;
        $display("FAIL t=%0d code=%h exp=%h", t, sub_code, exp_code);
      end
      checks++;
      if (hit !== (exp_code[0][0] != first_prev) || level !== exp_code[0][0]) begin
        failures++;
        $display("FAIL t=%0d hit=%b level=%b", t, hit, level);
      end
      if (hit) hits++;
      prev_code = sub_code;
    end
    if (hits == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
