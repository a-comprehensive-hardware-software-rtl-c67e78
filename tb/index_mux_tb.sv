// index_mux_tb: fills a 128-entry frame of 7-bit indexes and checks every position.
module index_mux_tb;
  localparam int unsigned N = 128, W = 7;
  logic [N-1:0][W-1:0]  indexes;
  logic [$clog2(N)-1:0] sel;
  logic [W-1:0]         index;
  int ref_idx [N];
  int checks = 0, failures = 0;

  index_mux #(.N_IDX(N), .IDX_W(W)) dut (.indexes, .sel, .index);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 10; t++) begin
      for (int i = 0; i < N; i++) begin
        ref_idx[i] = $urandom_range(N - 1);
        indexes[i] = W'(ref_idx[i]);
      end
      for (int i = 0; i < N; i++) begin
        sel = i[$clog2(N)-1:0];
        #1;
        checks++;
        if (int'(index) != ref_idx[i]) begin
          failures++;
          $display("position %0d: got %0d expected %0d", i, index, ref_idx[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
