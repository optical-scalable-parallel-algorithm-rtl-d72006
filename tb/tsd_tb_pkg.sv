// tsd_tb_pkg: arithmetic reference for the TSD adder testbenches.
//
// Everything here works on digit values as integers, independent of the
// plane logic under test: step 1 is x + y = 3c + s with the carry chosen so
// that s and c lie in {-1, 0, 1}; step 2 is z_i = s_i + c_{i-1}.
package tsd_tb_pkg;

  // Random TSD digit value in -2..2.
  function automatic int rand_digit();
    return int'($urandom_range(4)) - 2;
  endfunction

  // Random value in -1..1 (an intermediate sum or carry digit).
  function automatic int rand_trit();
    return int'($urandom_range(2)) - 1;
  endfunction

  // Step-1 rule: carry is 1 for sums 2..4, -1 for sums -4..-2, else 0.
  function automatic void step1_ref(input int x, input int y,
                                    output int s, output int c);
    int t;
    t = x + y;
    if (t >= 2)       c = 1;
    else if (t <= -2) c = -1;
    else              c = 0;
    s = t - 3 * c;
  endfunction

endpackage
