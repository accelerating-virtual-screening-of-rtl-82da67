// Self-checking test of hem with 4 inputs and 16-word node FIFOs. Four
// model FIFOs in the testbench stand for Octal Core outputs and are filled
// at very different rates (input 0 heavily); the output is drained at
// random. Every word must come out exactly once, each input's words in
// order; at each leaf pair the selector must take the input with the higher
// fill level; the node FIFOs must run full at some point (back-pressure)
// and busy must fall once everything is out.
module tb_hem;
  localparam int N = 4, D = 16, CW = 5;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic           rst_n, out_valid, out_pop, busy;
  logic [N-1:0]   in_valid, in_pop;
  logic [63:0]    in_data [N];
  logic [CW-1:0]  in_count [N];
  logic [63:0]    out_data;
  logic [63:0]    src [N][$];
  int             next_seq [N];
  int             n_in = 0, n_out = 0, n_prio = 0, n_full = 0;

  hem #(.N_IN(N), .WIDTH(64), .DEPTH(D)) dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("%t hem: %s", $time, what);
    end
  endtask

  task automatic present();
    for (int i = 0; i < N; i++) begin
      in_valid[i] = src[i].size() > 0;
      in_data[i]  = src[i].size() > 0 ? src[i][0] : '0;
      in_count[i] = CW'(src[i].size() > 16 ? 16 : src[i].size());
    end
  endtask

  initial begin
    int seq [N];
    int rate [N];
    rate = '{60, 15, 5, 25};
    seq = '{0, 0, 0, 0};
    next_seq = '{0, 0, 0, 0};
    rst_n = 1;
    #1 rst_n = 0; out_pop = 0;
    present();
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 6000; t++) begin
      bit [N-1:0] popped;
      bit         took;
      @(negedge clk);
      out_pop = out_valid && (t < 1000 ? ($urandom % 4 == 0) : ($urandom % 2 == 0)) || (t > 4000 && out_valid);
      #1;
      // priority rule at the two leaf pairs
      for (int p = 0; p < N; p += 2)
        if (in_valid[p] && in_valid[p+1] && (in_pop[p] || in_pop[p+1])) begin
          n_prio++;
          if (in_count[p] > in_count[p+1]) chk(in_pop[p], "fuller input not taken");
          if (in_count[p+1] > in_count[p]) chk(in_pop[p+1], "fuller input not taken");
        end
      if ((|in_valid) && in_pop == 0) n_full++;   // a leaf-level node is full
      popped = in_pop;
      took = out_pop && out_valid;
      if (took) begin
        int s, q;
        s = int'(out_data[63:32]);
        q = int'(out_data[31:0]);
        n_out++;
        chk(s < N && q == next_seq[s], $sformatf("word %0d of input %0d out of order", q, s));
        if (s < N) next_seq[s] = q + 1;
      end
      @(posedge clk);
      for (int i = 0; i < N; i++) if (popped[i]) void'(src[i].pop_front());
      if (t < 3000)
        for (int i = 0; i < N; i++)
          if (src[i].size() < 16 && ($urandom % 100) < rate[i]) begin
            src[i].push_back({32'(i), 32'(seq[i])});
            seq[i]++;
            n_in++;
          end
      #1 present();
    end
    chk(n_out == n_in, $sformatf("%0d words out of %0d", n_out, n_in));
    chk(n_prio > 50, "priority rule never exercised");
    chk(n_full > 0, "node FIFOs never ran full");
    chk(!busy && !out_valid, "not empty at the end");
    $display("hem: %0d words, %0d priority decisions, %0d cycles of back-pressure", n_in, n_prio, n_full);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
