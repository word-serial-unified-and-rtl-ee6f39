// tb_msq_fifo -- checks the fixed-delay FIFO at the core's two shapes
// (32 bits x 13 words and 2 bits x 12 words): a word pushed while en = 1
// comes out after exactly DEPTH enabled cycles, en = 0 freezes the buffer,
// and clr empties it to zero words. A queue model gives the expected output.
module tb_msq_fifo;
  logic clk = 1'b0, rst_n = 1'b0;
  logic en, clr;
  logic [31:0] din_w, dout_w;
  logic [1:0]  din_n, dout_n;
  int checks = 0, failures = 0, clears = 0, stalls = 0;

  msq_fifo #(.W(32), .DEPTH(13)) dut_w (.clk, .rst_n, .en, .clr, .din(din_w), .dout(dout_w));
  msq_fifo #(.W(2),  .DEPTH(12)) dut_n (.clk, .rst_n, .en, .clr, .din(din_n), .dout(dout_n));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] mw [$];
  logic [1:0]  mn [$];

  initial begin
    en = 1'b0; clr = 1'b0; din_w = '0; din_n = '0;
    for (int i = 0; i < 13; i++) mw.push_back('0);
    for (int i = 0; i < 12; i++) mn.push_back('0);
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < 5000; c++) begin
      @(negedge clk);
      checks += 2;
      if (dout_w !== mw[0]) begin
        failures++;
        if (failures < 10) $display("wide: got %h exp %h at %0d", dout_w, mw[0], c);
      end
      if (dout_n !== mn[0]) begin
        failures++;
        if (failures < 10) $display("narrow: got %h exp %h at %0d", dout_n, mn[0], c);
      end
      clr   = ($urandom % 200) == 0;
      en    = ($urandom % 5) != 0;
      din_w = $urandom;
      din_n = 2'($urandom);
      if (clr) begin
        clears++;
        foreach (mw[i]) mw[i] = '0;
        foreach (mn[i]) mn[i] = '0;
      end else if (en) begin
        void'(mw.pop_front()); mw.push_back(din_w);
        void'(mn.pop_front()); mn.push_back(din_n);
      end else begin
        stalls++;
      end
    end
    checks++;
    if (clears == 0 || stalls == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
