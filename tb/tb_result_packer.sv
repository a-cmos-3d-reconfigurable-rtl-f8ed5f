// tb_result_packer: feeds random strings and feature results in the pattern of the stack
// (one string every 16 cycles, the feature results 17 cycles after), with and without DoG,
// and checks every 128-bit beat and its tag against the expected queue, in order, plus the
// overflow flag when a slot is reloaded too early.
module tb_result_packer;
  import fd_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic str_valid = 1'b0, res_valid = 1'b0;
  str_tag_t str_tag = '0, res_tag = '0;
  pix_t scale [STR_W];
  logic [7:0] dog8 [STR_W], dx8 [STR_W], dy8 [STR_W], flags [STR_W];
  logic dram_valid, overflow;
  logic [BEAT_W-1:0] dram_data;
  beat_tag_t dram_tag;
  int checks = 0, failures = 0;
  logic [BEAT_W-1:0] exp_data [$];
  beat_tag_t exp_tag [$];

  result_packer dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [BEAT_W-1:0] pk(input logic [7:0] b [STR_W]);
    logic [BEAT_W-1:0] w;
    for (int i = 0; i < int'(STR_W); i++) w[8*i +: 8] = b[i];
    return w;
  endfunction

  function automatic beat_tag_t tg(input beat_kind_e k, input str_tag_t t);
    beat_tag_t b;
    b = '{kind: k, octave: t.octave, scale: t.scale, plane: t.plane, row: t.row, strip: t.strip};
    return b;
  endfunction

  always @(posedge clk)
    if (dram_valid) begin
      checks++;
      if (exp_data.size() == 0) begin
        failures++; $display("FAIL unexpected beat");
      end else begin
        logic [BEAT_W-1:0] d;
        beat_tag_t t;
        d = exp_data.pop_front();
        t = exp_tag.pop_front();
        if (d != dram_data || t != dram_tag) begin
          failures++; $display("FAIL beat kind %0d row %0d", dram_tag.kind, dram_tag.row);
        end
      end
    end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int r = 0; r < 40; r++) begin
      str_tag = str_tag_t'($urandom);
      str_tag.row = 8'(r);
      str_tag.first_scale = (r % 3 == 0);
      for (int i = 0; i < int'(STR_W); i++) begin scale[i] = 8'($urandom); dog8[i] = 8'($urandom); end
      str_valid = 1'b1;
      exp_data.push_back(pk(scale)); exp_tag.push_back(tg(BEAT_SCALE, str_tag));
      if (!str_tag.first_scale) begin exp_data.push_back(pk(dog8)); exp_tag.push_back(tg(BEAT_DOG, str_tag)); end
      @(negedge clk) str_valid = 1'b0;
      if (r > 0) begin
        // results of an earlier row, arriving one cycle later
        res_tag = str_tag_t'($urandom);
        for (int i = 0; i < int'(STR_W); i++) begin dx8[i] = 8'($urandom); dy8[i] = 8'($urandom); flags[i] = 8'($urandom); end
        res_valid = 1'b1;
        exp_data.push_back(pk(dx8));   exp_tag.push_back(tg(BEAT_DX, res_tag));
        exp_data.push_back(pk(dy8));   exp_tag.push_back(tg(BEAT_DY, res_tag));
        exp_data.push_back(pk(flags)); exp_tag.push_back(tg(BEAT_FLAGS, res_tag));
        @(negedge clk) res_valid = 1'b0;
      end
      repeat (14) @(negedge clk);
    end
    repeat (10) @(negedge clk);
    checks += 2;
    if (exp_data.size() != 0) begin failures++; $display("FAIL %0d beats missing", exp_data.size()); end
    if (overflow) begin failures++; $display("FAIL overflow in a legal pattern"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
