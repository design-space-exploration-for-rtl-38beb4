// tb_burst_buffer: writes a full burst of random words, reads them back in a
// scrambled order and checks data and the one-cycle read latency; then
// overwrites part of it and checks that only those words changed.
module tb_burst_buffer;
  localparam int DEPTH = 1024, W = 16;
  logic clk = 0;
  logic wr_en = 0, rd_en = 0;
  logic [9:0] wr_addr = 0, rd_addr = 0;
  logic [W-1:0] wr_data = 0, rd_data;
  logic [W-1:0] ref_mem [DEPTH];
  int checks = 0, failures = 0;

  burst_buffer #(.DEPTH(DEPTH), .W(W)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic read_all();
    for (int i = 0; i < DEPTH; i++) begin
      int a;
      a = (i * 337 + 11) % DEPTH;
      rd_en <= 1; rd_addr <= 10'(a);
      @(posedge clk);
      rd_en <= 0;
      #1;
      checks++;
      if (rd_data !== ref_mem[a]) begin
        failures++;
        if (failures < 10) $display("addr %0d got %h exp %h", a, rd_data, ref_mem[a]);
      end
    end
  endtask

  initial begin
    @(posedge clk);
    for (int i = 0; i < DEPTH; i++) begin
      ref_mem[i] = W'($urandom);
      wr_en <= 1; wr_addr <= 10'(i); wr_data <= ref_mem[i];
      @(posedge clk);
    end
    wr_en <= 0;
    read_all();
    for (int i = 0; i < 100; i++) begin
      int a;
      a = i * 5;
      ref_mem[a] = W'($urandom);
      wr_en <= 1; wr_addr <= 10'(a); wr_data <= ref_mem[a];
      @(posedge clk);
    end
    wr_en <= 0;
    read_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
