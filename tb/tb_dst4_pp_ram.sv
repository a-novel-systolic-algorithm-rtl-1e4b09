// tb_dst4_pp_ram: checks the double-banked RAM (11 words per bank).
//
// Both banks are filled with different random words; then, for many random
// cycles, one bank is read at a random address while the other bank is
// written. Every read must return, one cycle later, the last word written to
// that bank and address, as kept by a reference array in the test.
module tb_dst4_pp_ram;
  localparam int W = 24, DEPTH = 11, AW = 4;
  logic clk = 1'b0;
  logic wr_en = 1'b0, wr_bank = 1'b0, rd_bank = 1'b0;
  logic [AW-1:0] wr_addr = '0, rd_addr = '0;
  logic [W-1:0] wr_data = '0, rd_data;

  dst4_pp_ram #(.W(W), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [W-1:0] refm [2][DEPTH];

  initial begin
    for (int b = 0; b < 2; b++)
      for (int a = 0; a < DEPTH; a++) begin
        wr_en <= 1'b1; wr_bank <= b[0]; wr_addr <= AW'(a);
        refm[b][a] = W'($urandom);
        wr_data <= refm[b][a];
        @(posedge clk);
      end
    wr_en <= 1'b0;
    for (int t = 0; t < 300; t++) begin
      int rb, ra, wa;
      logic [W-1:0] expv;
      rb = int'($urandom_range(1)); ra = int'($urandom_range(DEPTH - 1));
      wa = int'($urandom_range(DEPTH - 1));
      rd_bank <= rb[0]; rd_addr <= AW'(ra);
      wr_en <= 1'($urandom_range(1)); wr_bank <= ~rb[0]; wr_addr <= AW'(wa);
      wr_data <= W'($urandom);
      expv = refm[rb][ra];
      @(posedge clk);
      if (wr_en) refm[1 - rb][wa] = wr_data;
      #1;
      checks++;
      if (rd_data != expv) begin
        failures++;
        $display("read bank %0d addr %0d: %h expected %h", rb, ra, rd_data, expv);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
