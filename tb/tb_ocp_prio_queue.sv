// tb_ocp_prio_queue: random pushes and pops against a reference list. The
// head must be the oldest entry with the smallest priority value, full and
// empty must track the count, and simultaneous push and pop on a full queue
// must work.
module tb_ocp_prio_queue;
  localparam int DEPTH = 4, PW = 3, W = 16;
  logic          clk = 1'b0, rst_n = 1'b0;
  logic          push, pop, head_valid, empty, full;
  logic [PW-1:0] push_prio, head_prio;
  logic [W-1:0]  push_data, head_data;
  int checks = 0, failures = 0, n_full_pushpop = 0;
  logic [PW+W-1:0] model [$];

  ocp_prio_queue #(.DEPTH(DEPTH), .PW(PW), .W(W)) dut (.clk, .rst_n, .push, .push_prio,
    .push_data, .pop, .head_valid, .head_prio, .head_data, .empty, .full);
  always #5 clk = ~clk;

  function automatic int best();
    automatic int b = 0;
    for (int i = 1; i < model.size(); i++)
      if (model[i][PW+W-1:W] < model[b][PW+W-1:W]) b = i;
    return b;
  endfunction

  initial begin
    push = 0; pop = 0; push_prio = 0; push_data = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 5000; t++) begin
      @(negedge clk);
      push      = ($urandom_range(0, 9) < 6);
      pop       = ($urandom_range(0, 9) < 5);
      push_prio = PW'($urandom_range(0, 3));
      push_data = W'(t);
      #1;
      checks++;
      if (empty != (model.size() == 0) || full != (model.size() == DEPTH) ||
          head_valid != (model.size() != 0)) begin
        failures++;
        $display("FAIL t=%0d flags, model %0d", t, model.size());
      end
      if (model.size() != 0) begin
        automatic int b = best();
        checks++;
        if ({head_prio, head_data} != model[b]) begin
          failures++;
          $display("FAIL t=%0d head %0d/%0d exp %0d/%0d", t, head_prio, head_data,
                   model[b][PW+W-1:W], model[b][W-1:0]);
        end
      end
      @(posedge clk);
      begin
        automatic bit dp = pop && model.size() != 0;
        automatic bit dq = push && (model.size() < DEPTH || dp);
        if (dp && dq && model.size() == DEPTH) n_full_pushpop++;
        if (dp) model.delete(best());
        if (dq) model.push_back({push_prio, push_data});
      end
    end
    checks++;
    if (n_full_pushpop == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
