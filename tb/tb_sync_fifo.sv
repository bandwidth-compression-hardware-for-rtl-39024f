// tb_sync_fifo: the per-channel block FIFO, 32 bits wide and 8 deep.
// Checks:
//  - random writes and reads against a queue model: data, order, valid flag;
//  - it accepts exactly DEPTH words when never read, then refuses;
//  - first-word fall-through: a word written into an empty FIFO is visible
//    at the output in the next cycle; full rate with simultaneous read and
//    write.
module tb_sync_fifo;
  localparam int DEPTH = 8;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, out_valid, out_ready = 0;
  logic [31:0] in_data = '0, out_data;
  sync_fifo #(.WIDTH(32), .DEPTH(DEPTH)) dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_ready(in_ready),
    .in_data(in_data), .out_valid(out_valid), .out_ready(out_ready), .out_data(out_data));
  always #5 clk = ~clk;

  logic [31:0] model[$];

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // check and update the model at each edge
  always @(posedge clk)
    if (rst_n) begin
      checks++;
      if (out_valid !== (model.size() != 0) || in_ready !== (model.size() < DEPTH)) begin
        failures++; $display("FAIL flags: valid=%b ready=%b size=%0d", out_valid, in_ready, model.size());
      end
      if (out_valid && out_ready) begin
        checks++;
        if (out_data !== model[0]) begin failures++; $display("FAIL data %h exp %h", out_data, model[0]); end
        void'(model.pop_front());
      end
      if (in_valid && in_ready) model.push_back(in_data);
    end

  initial begin
    int acc;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk); #1;
    for (int i = 0; i < 5000; i++) begin
      in_valid = ($urandom % 100) < 50; in_data = $urandom;
      out_ready = ($urandom % 100) < 50;
      @(posedge clk); #1;
    end
    in_valid = 0; out_ready = 1;
    repeat (DEPTH + 2) @(posedge clk); #1;
    // fill without reading
    out_ready = 0; acc = 0;
    for (int i = 0; i < DEPTH + 4; i++) begin
      in_valid = 1; in_data = i;
      if (in_ready) acc++;
      @(posedge clk); #1;
    end
    checks++;
    if (acc != DEPTH) begin failures++; $display("FAIL accepted %0d words when never read", acc); end
    in_valid = 0; out_ready = 1;
    repeat (DEPTH + 2) @(posedge clk); #1;
    // fall-through and full rate
    in_valid = 1; in_data = 32'hA5A5_0001;
    @(posedge clk); #1;
    checks++;
    if (!out_valid || out_data !== 32'hA5A5_0001) begin failures++; $display("FAIL no fall-through"); end
    acc = 0;
    for (int i = 0; i < 100; i++) begin
      in_data = i; if (in_ready && out_valid) acc++;
      @(posedge clk); #1;
    end
    checks++;
    if (acc != 100) begin failures++; $display("FAIL rate %0d/100", acc); end
    in_valid = 0;
    repeat (5) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
