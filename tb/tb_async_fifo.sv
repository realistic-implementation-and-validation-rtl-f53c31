// tb_async_fifo: random traffic between two unrelated clocks (7 ns write,
// 11 ns read, and then the reverse speeds): every word written while not
// full is read back once, in order; the FIFO reports full after DEPTH
// writes with no reads, and empty again once drained.
module tb_async_fifo;
  localparam int W = 16, DEPTH = 8;
  logic wclk = 0, rclk = 0, rst_n = 0;
  int wper = 7, rper = 11;
  always #(wper) wclk = ~wclk;
  always #(rper) rclk = ~rclk;
  int checks = 0, failures = 0;

  logic wr = 0, rd = 0, full, empty;
  logic [W-1:0] wdata = 0, rdata;
  async_fifo #(.W(W), .DEPTH(DEPTH)) dut (
    .wclk, .wrst_n(rst_n), .wr, .wdata, .full, .rclk, .rrst_n(rst_n), .rd, .rdata, .empty);

  logic [W-1:0] model [$];
  int nread = 0;
  bit rd_en = 0, wr_en = 0;

  always @(posedge wclk) if (rst_n && wr && !full) model.push_back(wdata);
  always @(posedge rclk) if (rst_n && rd && !empty) begin
    checks++;
    if (model.size() == 0 || rdata !== model[0]) begin
      failures++; $display("read %h expected %h", rdata, model.size() ? model[0] : '0);
    end
    if (model.size()) void'(model.pop_front());
    nread++;
  end

  always @(negedge wclk) begin
    wr    <= wr_en && ($urandom % 3 != 0) && !full;
    wdata <= W'($urandom);
  end
  always @(negedge rclk) rd <= rd_en && ($urandom % 4 != 0) && !empty;

  initial begin
    repeat (3) @(posedge rclk);
    rst_n = 1;
    // fill with no reads: must report full after DEPTH words
    wr_en = 1;
    repeat (40) @(posedge wclk);
    checks++;
    if (!full || model.size() != DEPTH) begin failures++; $display("full=%b with %0d words", full, model.size()); end
    rd_en = 1;
    repeat (2000) @(posedge wclk);
    wper = 11; rper = 7;
    repeat (2000) @(posedge wclk);
    wr_en = 0;
    repeat (40) @(posedge rclk);
    checks++;
    if (!empty || model.size() != 0) begin failures++; $display("not drained: %0d left", model.size()); end
    checks++;
    if (nread < 1000) begin failures++; $display("only %0d reads", nread); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
