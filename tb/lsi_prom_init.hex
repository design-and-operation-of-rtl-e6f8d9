1111
2222
3333
4444
