// fdsi: file data sink. Behavioural simulation model, not synthesizable: it
// writes the stream coming out of a module under test into a comma
// separated file, for comparison with a reference implementation after the
// simulation.
//
// Every stream word is written as an unsigned decimal number (SIGNED = 1:
// two's complement), PER_LINE values per line, separated by commas. A pulse
// on close ends the line and closes the file; words after that are ignored.
// count gives the number of words written.
// The document describes the function (stream to file, for verification);
// the number format and the close input are this model's choices.
module fdsi #(
  parameter string       FILE     = "tb/fdsi_result.dat",
  parameter int unsigned DW       = 8,
  parameter int unsigned PER_LINE = 16,
  parameter bit          SIGNED   = 1'b0
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic [DW-1:0] in_data,
  input  logic          close,
  output int            count
);
  int fd = 0;
  int col = 0;

  initial begin
    count = 0;
    fd = $fopen(FILE, "w");
    if (fd == 0) $display("fdsi: cannot open %s", FILE);
  end

  always @(posedge clk) begin
    if (rst_n && fd != 0) begin
      if (in_valid) begin
        if (col != 0) $fwrite(fd, ",");
        if (SIGNED) $fwrite(fd, "%0d", $signed(in_data));
        else        $fwrite(fd, "%0d", in_data);
        col++;
        count++;
        if (col == int'(PER_LINE)) begin
          $fwrite(fd, "\n");
          col = 0;
        end
      end
      if (close) begin
        if (col != 0) $fwrite(fd, "\n");
        $fclose(fd);
        fd = 0;
      end
    end
  end

endmodule
