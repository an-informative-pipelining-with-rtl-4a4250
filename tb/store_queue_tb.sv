// store_queue_tb: every valid entry is written exactly DEPTH cycles after
// it entered, in order; flush discards everything inside and blocks the
// write at the head in its own cycle; empty reflects the contents.
module store_queue_tb;
  localparam int DEPTH = 5;
  logic clk = 1'b0, rst_n = 1'b0, flush = 1'b0, in_valid = 1'b0;
  logic [12:0] in_addr = '0;
  logic [7:0] in_data = '0;
  logic wr_en, empty;
  logic [12:0] wr_addr;
  logic [7:0] wr_data;
  int checks = 0, failures = 0;

  store_queue #(.DEPTH(DEPTH), .ADDR_W(13), .DATA_W(8)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference: a delay line of DEPTH entries
  typedef struct { bit v; int a; int d; } ent_t;
  ent_t line [DEPTH];
  int n_flush = 0, n_writes = 0;

  initial begin
    @(negedge clk); @(negedge clk); rst_n = 1;
    for (int i = 0; i < DEPTH; i++) line[i].v = 0;
    for (int t = 0; t < 400; t++) begin
      @(negedge clk);
      in_valid = ($urandom % 3) != 0;
      in_addr = 13'($urandom); in_data = 8'($urandom);
      flush = ($urandom % 23) == 0;
      #1;
      // head check before the edge
      checks++;
      if (wr_en !== (line[DEPTH-1].v && !flush) ||
          (wr_en && (wr_addr !== 13'(line[DEPTH-1].a) || wr_data !== 8'(line[DEPTH-1].d)))) begin
        failures++; $display("t=%0d head mismatch wr_en=%b", t, wr_en);
      end
      begin
        bit any;
        any = 0;
        for (int i = 0; i < DEPTH; i++) any |= line[i].v;
        checks++;
        if (empty !== !any) begin failures++; $display("t=%0d empty wrong", t); end
      end
      if (wr_en) n_writes++;
      if (flush) n_flush++;
      // advance the model at the edge
      if (flush) for (int i = 0; i < DEPTH; i++) line[i].v = 0;
      else begin
        for (int i = DEPTH-1; i > 0; i--) line[i] = line[i-1];
        line[0] = '{in_valid, int'(in_addr), int'(in_data)};
      end
    end
    flush = 0;
    checks++; if (n_flush == 0 || n_writes == 0) begin failures++; $display("no flush or no write seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
