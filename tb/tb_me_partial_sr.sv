// tb_me_partial_sr: drives the partial-solution register with random pair
// pushes and pops (never past full or empty, sometimes both in one cycle, and
// runs that fill it to its depth and drain it again) and compares the head
// pair and the fill count with a queue model every cycle.
module tb_me_partial_sr;
  import me_pkg::*;
  localparam int unsigned DEPTH = 12;
  logic clk = 0, rst_n = 0, push2 = 0, pop2 = 0;
  mv_result_t in_a = '0, in_c = '0, head_a, head_c;
  logic [$clog2(DEPTH+1)-1:0] count;
  int checks = 0, failures = 0;
  mv_result_t model [$];
  int n_full = 0, n_both = 0;

  always #5 clk = ~clk;

  me_partial_sr #(.DEPTH(DEPTH)) dut (.*);

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic mv_result_t rnd();
    mv_result_t r;
    r.found = 1'($urandom);
    r.sad   = sad_t'($urandom);
    r.mv_x  = mv_t'($urandom);
    r.mv_y  = mv_t'($urandom);
    return r;
  endfunction

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      // phases: fill, drain, random
      automatic int ph = (t / 100) % 3;
      automatic int n = model.size();
      automatic bit can_pop = (n >= 2);
      automatic bit want_push = (ph == 0) ? 1'b1 : (ph == 1) ? 1'b0 : bit'($urandom_range(0, 1));
      automatic bit want_pop  = (ph == 0) ? bit'($urandom_range(0, 3) == 0) : (ph == 1) ? 1'b1 : bit'($urandom_range(0, 1));
      pop2  = want_pop && can_pop;
      push2 = want_push && (n - (pop2 ? 2 : 0) + 2 <= int'(DEPTH));
      in_a = rnd(); in_c = rnd();
      @(posedge clk);
      if (pop2) begin void'(model.pop_front()); void'(model.pop_front()); end
      if (push2) begin model.push_back(in_a); model.push_back(in_c); end
      if (pop2 && push2) n_both++;
      if (model.size() == DEPTH) n_full++;
      @(negedge clk);
      checks++;
      if (int'(count) != model.size()) begin
        failures++;
        if (failures < 10) $display("t=%0d count %0d expected %0d", t, count, model.size());
      end
      if (model.size() >= 2) begin
        checks++;
        if (head_a !== model[0] || head_c !== model[1]) begin
          failures++;
          if (failures < 10) $display("t=%0d head mismatch", t);
        end
      end
    end
    checks += 2;
    if (n_full == 0) begin failures++; $display("never full"); end
    if (n_both == 0) begin failures++; $display("never push and pop together"); end
    $display("full %0d times, push+pop %0d times", n_full, n_both);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
