// tb_sample_fifo - 16-deep FIFO against a queue model.
// Random writes and reads for 3000 cycles, including runs that fill the
// buffer (writes to a full buffer are dropped and set overflow) and runs
// that empty it. Data, empty, full, count and overflow are compared with
// the model every cycle; clr_i must empty the buffer and clear overflow.
//
// The buffer behaviour checked (drop on full, sticky overflow) is this
// design's own choice.
module tb_sample_fifo;
  localparam int unsigned W = 12, D = 16;
  logic clk = 1'b0, rst = 1'b1, clr = 1'b0, we = 1'b0, re = 1'b0;
  logic [W-1:0] wd = '0, rd;
  logic empty, full, ovf;
  logic [4:0] cnt;
  int checks = 0, failures = 0, n_ovf = 0;
  logic [W-1:0] model [$];
  bit m_ovf = 0;

  sample_fifo #(.W(W), .DEPTH(D)) dut (.clk, .rst, .clr_i(clr), .wr_en_i(we), .wr_data_i(wd),
    .rd_en_i(re), .rd_data_o(rd), .empty_o(empty), .full_o(full), .overflow_o(ovf), .count_o(cnt));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int bias;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    for (int n = 0; n < 3000; n++) begin
      bias = ((n / 200) % 2 == 0) ? 80 : 20;   // alternate filling and draining
      @(negedge clk);
      // compare outputs with the model
      checks += 4;
      if (empty != (model.size() == 0)) failures++;
      if (full != (model.size() == int'(D))) failures++;
      if (int'(cnt) != model.size()) failures++;
      if (ovf != m_ovf) failures++;
      if (model.size() > 0) begin
        checks++;
        if (rd != model[0]) failures++;
      end
      we = ($urandom % 100) < bias;
      re = ($urandom % 100) < 100 - bias;
      wd = W'($urandom);
      clr = (n == 2500);
      @(posedge clk);
      if (clr) begin model.delete(); m_ovf = 0; end
      else begin
        if (re && model.size() > 0) void'(model.pop_front());
        else if (re) ;
        if (we) begin
          if (model.size() + ((re && !empty) ? 1 : 0) >= int'(D) && full) begin m_ovf = 1; n_ovf++; end
          else model.push_back(wd);
        end
      end
    end
    checks++;
    if (n_ovf == 0) begin failures++; $display("overflow never happened"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
