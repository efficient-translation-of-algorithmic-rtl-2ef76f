// mmc_sequencer: the program counter shared by all instruction memories of
// the array. A start pulse runs addresses 0 .. prog_len-1, one per cycle, with
// run high; done pulses in the cycle after the last word has executed.
// Lock-step execution is what lets two neighbours pair an OUTPUT with an
// INPUT in the same cycle. A shared counter, start/length control and the
// done pulse are this design's choices. An assertion checks that the counter
// stays inside the program and the memory.
module mmc_sequencer #(
  parameter int unsigned DEPTH = 512
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     start,
  input  logic [$clog2(DEPTH):0]   prog_len,
  output logic [$clog2(DEPTH)-1:0] pc,
  output logic                     run,
  output logic                     done
);

  logic [$clog2(DEPTH):0] cnt;

  assign pc = cnt[$clog2(DEPTH)-1:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt  <= '0;
      run  <= 1'b0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (run) begin
        // the counter never runs past the program or the memory
        assert (cnt < prog_len && cnt < ($clog2(DEPTH)+1)'(DEPTH))
          else $error("program counter %0d out of range", cnt);
        if (cnt + 1'b1 >= prog_len) begin
          run  <= 1'b0;
          done <= 1'b1;
          cnt  <= '0;
        end else begin
          cnt <= cnt + 1'b1;
        end
      end else if (start && prog_len != 0) begin
        run <= 1'b1;
        cnt <= '0;
      end
    end
  end

endmodule
