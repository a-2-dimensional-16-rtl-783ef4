// tb_srb: loads 16 random words one per cycle, then shifts for 16 cycles while checking every
// serial output bit (LSB first) and feeding new serial bits in, then checks the words that were
// shifted in on the parallel outputs; repeated with random data.
module tb_srb;
  logic clk = 0;
  logic load_en, shift_en;
  logic [3:0] load_idx;
  logic [15:0] load_data;
  logic [15:0] ser_in, ser_out;
  logic [15:0] par_out [16];
  int checks = 0, failures = 0;

  srb dut (.clk, .load_en, .load_idx, .load_data, .shift_en, .ser_in, .ser_out, .par_out);

  always #5 clk = ~clk;

  initial begin
    logic [15:0] w [16], v [16];
    load_en = 0; shift_en = 0; load_idx = 0; load_data = 0; ser_in = 0;
    @(negedge clk);
    for (int rep = 0; rep < 20; rep++) begin
      for (int i = 0; i < 16; i++) begin
        w[i] = 16'($urandom); v[i] = 16'($urandom);
        load_en = 1; load_idx = 4'(i); load_data = w[i];
        @(negedge clk);
      end
      load_en = 0;
      for (int i = 0; i < 16; i++) begin
        checks++;
        if (par_out[i] !== w[i]) begin failures++; $display("load word %0d", i); end
      end
      for (int j = 0; j < 16; j++) begin
        shift_en = 1;
        for (int i = 0; i < 16; i++) ser_in[i] = v[i][j];
        #1;
        for (int i = 0; i < 16; i++) begin
          checks++;
          if (ser_out[i] !== w[i][j]) begin failures++; $display("ser_out word %0d bit %0d", i, j); end
        end
        @(negedge clk);
      end
      shift_en = 0;
      // hold for a few cycles
      repeat (3) @(negedge clk);
      for (int i = 0; i < 16; i++) begin
        checks++;
        if (par_out[i] !== v[i]) begin failures++; $display("shifted-in word %0d: %h vs %h", i, par_out[i], v[i]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
