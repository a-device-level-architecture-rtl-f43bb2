// tb_sync_fifo: random pushes and pops against a queue model; checks data
// order, full/empty flags and the count output.
module tb_sync_fifo;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic       in_valid, in_ready, out_valid, out_ready;
  logic [7:0] in_data, out_data;
  logic [3:0] count;
  logic [7:0] model [$];

  sync_fifo #(.W(8), .DEPTH(8)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0; out_ready = 0; in_data = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      // flags against the model
      checks++;
      if (in_ready != (model.size() < 8) || out_valid != (model.size() > 0) ||
          int'(count) != model.size()) begin
        failures++;
        $display("flag mismatch: size=%0d in_ready=%b out_valid=%b count=%0d",
                 model.size(), in_ready, out_valid, count);
      end
      if (out_valid) begin
        checks++;
        if (out_data != model[0]) begin
          failures++;
          $display("data mismatch %h vs %h", out_data, model[0]);
        end
      end
      in_valid  = ($urandom % 100) < ((i / 500) % 2 ? 70 : 30);
      out_ready = ($urandom % 100) < ((i / 500) % 2 ? 30 : 70);
      in_data   = 8'($urandom);
      @(posedge clk);
      #1;
    end
    // bookkeeping done at the clock edge below
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (out_valid && out_ready) void'(model.pop_front());
    if (in_valid && in_ready) model.push_back(in_data);
  end
endmodule
