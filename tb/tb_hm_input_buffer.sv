// tb_hm_input_buffer: self-checking testbench for hm_input_buffer.
//
// Drives random pushes, retirements of 0..count head entries, and rare
// flushes, and keeps a queue model of the buffer: retire from the front,
// discard the oldest when a push finds it full (overflow_o must pulse), append
// at the back. After every cycle the valid entries, their order, the count
// and the overflow pulse are compared with the model. Runs at the default
// depth of 7.
module tb_hm_input_buffer;
  import hm_pkg::*;

  localparam int unsigned DEPTH = 7;
  localparam int unsigned CW    = $clog2(DEPTH + 1);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic             flush = 0, push = 0, overflow_o;
  fetch_t           push_data = '0;
  logic [CW-1:0]    pop_n = '0, count;
  fetch_t           entry [DEPTH];
  logic [DEPTH-1:0] entry_valid;

  int checks = 0, failures = 0, n_ovf = 0, n_multi_pop = 0;

  hm_input_buffer #(.DEPTH(DEPTH)) dut (.*);

  fetch_t q[$];

  initial begin
    logic exp_ovf;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      flush     = ($urandom % 200) == 0;
      push      = ($urandom % 3) != 0;
      push_data = {$urandom, $urandom};
      pop_n     = CW'($urandom % (q.size() + 1));
      if (($urandom % 2) == 0) pop_n = '0;
      // model
      exp_ovf = 1'b0;
      if (flush) q.delete();
      else begin
        if (pop_n > 1) n_multi_pop++;
        repeat (int'(pop_n)) void'(q.pop_front());
        if (push) begin
          if (q.size() == DEPTH) begin void'(q.pop_front()); exp_ovf = 1'b1; n_ovf++; end
          q.push_back(push_data);
        end
      end
      @(negedge clk);
      checks++;
      if (int'(count) != q.size() || overflow_o != exp_ovf) begin
        failures++;
        $display("FAIL: count=%0d expected %0d, overflow=%b expected %b", count, q.size(), overflow_o, exp_ovf);
      end
      for (int k = 0; k < DEPTH; k++) begin
        checks++;
        if (entry_valid[k] != (k < q.size()) || (k < q.size() && entry[k] != q[k])) begin
          failures++; $display("FAIL: entry %0d", k);
        end
      end
      flush = 0; push = 0; pop_n = '0;
    end
    checks++;
    if (n_ovf < 10 || n_multi_pop < 10) begin failures++; $display("FAIL: coverage ovf=%0d", n_ovf); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
