// vehicles_model -- behavioural model of the controlled object: two vehicles
// on straight tracks, for simulation only.
//
// W1 runs between a (position 0) and b (position LEN1), W2 between c
// (position 0) and d (position LEN2). While its "right" command is on a
// vehicle advances one position per clock, while its "left" command is on it
// goes back one position per clock; it stops at either end of its track. The
// end-point sensors are active while the vehicle stands on them. Setting
// stall2 freezes W2 in place, as a stuck vehicle. Both vehicles start at
// their starting points after reset. `conflict1`/`conflict2` report a vehicle
// commanded both ways at once.
module vehicles_model (
  input  logic        clk,
  input  logic        rst_n,
  input  int unsigned len1,
  input  int unsigned len2,
  input  logic        stall2,
  input  logic        r1,
  input  logic        l1,
  input  logic        r2,
  input  logic        l2,
  output logic        a,
  output logic        b,
  output logic        c,
  output logic        d,
  output logic        conflict1,
  output logic        conflict2
);
  int unsigned pos1, pos2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pos1 <= 0;
      pos2 <= 0;
    end else begin
      if (r1 && !l1 && pos1 < len1) pos1 <= pos1 + 1;
      if (l1 && !r1 && pos1 > 0)    pos1 <= pos1 - 1;
      if (!stall2) begin
        if (r2 && !l2 && pos2 < len2) pos2 <= pos2 + 1;
        if (l2 && !r2 && pos2 > 0)    pos2 <= pos2 - 1;
      end
    end
  end

  assign a = (pos1 == 0);
  assign b = (pos1 == len1);
  assign c = (pos2 == 0);
  assign d = (pos2 == len2);
  assign conflict1 = r1 && l1;
  assign conflict2 = r2 && l2;
endmodule
